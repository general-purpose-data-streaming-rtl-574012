// tb_tdc_block: one channel end to end (TAPS = 16, 64-cycle frames, 8-word
// FIFO). Random pulses are sampled into tap words; the testbench drives the
// heartbeat (beat in the last cycle of each frame) and works out, from the
// pulse times alone, the hit words each frame must hold: leading time
// (capture cycle, fine count), TOT in taps, placed in the frame of the
// trailing edge. Phases: streaming; TOT window on; trigger-emulation gate
// closed for some frames; reading stopped for three frames so the FIFO
// overflows. Checks the exact word stream (hits in order, delimiter with frame
// number), the overflow flag and the lost-hit count in the overflow frames.
module tb_tdc_block;
  import str_tdc_pkg::*;
  localparam int T = 16, CW = 6, FR = 1 << CW, NFR = 40;
  localparam logic [CH_W-1:0] CH = 6'd37;
  logic clk = 0, rst = 1;
  logic [T-1:0] taps = '0;
  logic [HB_W-1:0] hb_count = '0;
  logic beat = 0, beat_resync = 0, gate = 1, tot_en = 0, rd_want = 0;
  logic rd_en;
  logic [FRAME_W-1:0] beat_frame = '0;
  logic [TOT_W-1:0] tot_min = 16'd30, tot_max = 16'd70;
  word_t dout;
  logic empty, hit_lost, edge_dropped, tot_rejected;
  int checks = 0, failures = 0;

  tdc_block #(.TAPS(T), .CNT_W(CW), .CH_ID(CH), .FIFO_DEPTH(8)) dut (.*);
  always #4 clk = ~clk;
  assign rd_en = rd_want && !empty;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int cyc_of(int t); return (t + T - 1) / T; endfunction
  function automatic int fine_of(int t); return t - (cyc_of(t) - 1) * T - 1; endfunction
  function automatic bit tot_phase(int f); return f >= 8 && f < 14; endfunction
  function automatic bit gate_closed(int f); return f >= 16 && f < 19; endfunction
  function automatic bit stop_phase(int f); return f >= 24 && f < 27; endfunction

  bit sig_at [int];
  word_t exp_hits [NFR][$];
  int n_lost_ev, n_rej_ev, n_gated;
  always @(posedge clk) if (!rst) begin
    if (hit_lost) n_lost_ev++;
    if (tot_rejected) n_rej_ev++;
  end

  int t, w, kle, kte, fr, tot;
  hit_word_t hw;
  initial begin
    n_lost_ev = 0; n_rej_ev = 0; n_gated = 0;
    t = 2 * T;
    while (cyc_of(t + 8 * T) < (NFR - 2) * FR) begin
      w = T / 2 + $urandom % (6 * T);
      kle = cyc_of(t); kte = cyc_of(t + w); fr = kte / FR;
      for (int s = t; s < t + w; s++) sig_at[s] = 1;
      if (!(tot_phase(fr) && (w < 30 || w > 70)) && !gate_closed(fr)) begin
        hw = '0; hw.kind = KIND_HIT; hw.ch = CH; hw.tot = TOT_W'(w);
        hw.coarse = HB_W'(kle % FR); hw.fine = FINE_W'(fine_of(t));
        exp_hits[fr].push_back(word_t'(hw));
      end
      if (gate_closed(fr)) n_gated++;
      t = t + w + T + 1 + $urandom % (4 * T);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  // stimulus: cycle k drives tap word k and heartbeat count k % FR
  int k = 0;
  always @(negedge clk) if (!rst) begin
    k <= k + 1;
    for (int i = 0; i < T; i++) taps[i] <= sig_at.exists((k + 1) * T - i);
    hb_count   <= HB_W'((k + 1) % FR);
    beat       <= ((k + 1) % FR) == FR - 1;
    beat_frame <= FRAME_W'((k + 1) / FR);
    tot_en     <= tot_phase((k + 1 - 2) / FR);
    gate       <= !gate_closed((k + 1 - 3) / FR);
    rd_want    <= !stop_phase((k + 1) / FR) && ($urandom % 4 != 0);
  end

  // checker on the read side
  int cur_f = 0, idx = 0, miss_f = 0, miss_total = 0, nhits = 0, nflag = 0;
  always @(posedge clk) if (!rst && rd_en) begin
    if (is_delim(dout)) begin
      delim_word_t d;
      d = delim_word_t'(dout);
      miss_f += exp_hits[cur_f].size() - idx;
      chk(d.frame == FRAME_W'(cur_f), $sformatf("delimiter frame %0d exp %0d", d.frame, cur_f));
      chk(d.flags[FLAG_OVERFLOW] == (miss_f > 0), $sformatf("overflow flag frame %0d", cur_f));
      if (d.flags[FLAG_OVERFLOW]) nflag++;
      if (!stop_phase(cur_f) && !stop_phase(cur_f - 1)) chk(miss_f == 0, $sformatf("no loss in frame %0d", cur_f));
      miss_total += miss_f;
      cur_f++; idx = 0; miss_f = 0;
    end else begin
      int j;
      j = idx;
      while (j < exp_hits[cur_f].size() && exp_hits[cur_f][j] != dout) j++;
      chk(j < exp_hits[cur_f].size(), $sformatf("hit %h expected in frame %0d", dout, cur_f));
      miss_f += j - idx; idx = j + 1; nhits++;
    end
  end

  initial begin
    wait (cur_f == NFR - 1);
    chk(nhits > 200, $sformatf("hits seen %0d", nhits));
    chk(miss_total > 0 && miss_total == n_lost_ev, $sformatf("lost %0d, hit_lost pulses %0d", miss_total, n_lost_ev));
    chk(nflag > 0, "overflow flagged");
    chk(n_rej_ev > 0, "TOT cut rejected hits");
    chk(n_gated > 0, "gate closed on hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
