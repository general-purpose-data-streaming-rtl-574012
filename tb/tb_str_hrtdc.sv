// tb_str_hrtdc: the high-resolution TDC with two mezzanine groups of 4
// channels each (192 taps per clock, 512-cycle frames), checked end to end
// through front and back mergers with tdc_tb_pkg::tdc_stim. Includes pulses
// too long for the pairing timeout (unpaired edges), a TOT window phase, a
// trigger-emulation phase and a phase with the output link not ready.
module tb_str_hrtdc;
  import str_tdc_pkg::*;
  import tdc_tb_pkg::*;
  localparam int T = 192, NM = 2, CPM = 4, N = NM * CPM, CW = 9, FR = 1 << CW, NFR = 16, GW = 40;
  localparam int MAXC = (65536 / T) - 1;
  logic clk = 0, rst = 1;
  logic [T-1:0] taps [N];
  logic sync_en = 0, sync_beat = 0;
  logic [FRAME_W-1:0] sync_frame = '0;
  logic trig_mode = 0, trigger = 0, tot_en = 0;
  logic [15:0] gate_width = 16'(GW);
  logic [TOT_W-1:0] tot_min = 16'd400, tot_max = 16'd1200;
  logic out_valid, out_ready = 0;
  word_t out_data;
  logic hit_lost, edge_dropped, tot_rejected, merge_stall, frame_mismatch, frame_done, trig_accepted;
  int checks = 0, failures = 0;

  str_hrtdc #(.N_MEZZ(NM), .CH_PER_MEZZ(CPM), .TAPS(T), .CNT_W(CW),
              .CH_FIFO_DEPTH(8), .FRONT_DEPTH(16), .BACK_DEPTH(16)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit tot_phase(int f);  return f >= 3 && f < 5; endfunction
  function automatic bit trig_phase(int f); return f >= 6 && f < 8; endfunction
  function automatic bit stop_phase(int f); return f >= 10 && f < 12; endfunction

  tdc_stim stim;
  int k, last_trig, n_trig, n_rej, n_lost, n_stall, n_done, n_mis, n_edrop;
  bit started = 0;
  initial begin
    stim = new(T, N, FR, 0, MAXC);
    stim.tot_min = 400; stim.tot_max = 1200;
    stim.gen(2, (NFR - 3) * FR, 5, 1'b1);
    for (int c = 0; c < N; c++) taps[c] = '0;
    last_trig = -1000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0; k = 0; started = 1;
    forever begin
      for (int c = 0; c < N; c++) taps[c] = T'(stim.taps(c, k));
      tot_en    = tot_phase((k - 2) / FR);
      trig_mode = trig_phase((k - 3) / FR);
      trigger   = trig_mode && ($urandom % 60 == 0);
      out_ready = !stop_phase(k / FR) && ($urandom % 4 != 0);
      stim.note(k, tot_en, !trig_mode || (k >= last_trig + 1 && k <= last_trig + GW));
      if (trigger) last_trig = k;
      @(negedge clk);
      k++;
    end
  end

  always @(posedge clk) if (started) begin
    if (out_valid && out_ready) chk(stim.take(out_data), "stream word");
    if (trig_accepted) n_trig++;
    if (tot_rejected) n_rej++;
    if (hit_lost) n_lost++;
    if (merge_stall) n_stall++;
    if (frame_done) n_done++;
    if (frame_mismatch) n_mis++;
    if (edge_dropped) n_edrop++;
  end

  initial begin
    n_trig = 0; n_rej = 0; n_lost = 0; n_stall = 0; n_done = 0; n_mis = 0; n_edrop = 0;
    wait (started && stim.cur_f == NFR - 1);
    $display("hits %0d frames %0d missed %0d ovf-frames %0d short %0d long %0d trig %0d rej %0d lost %0d stall %0d edrop %0d",
             stim.nhits, stim.nframes, stim.nmiss, stim.nflag_ovf, stim.nshort, stim.nlong,
             n_trig, n_rej, n_lost, n_stall, n_edrop);
    chk(stim.nhits > 300, "hits flowed");
    chk(stim.nshort > 0 && stim.nlong > 0, "short and long pulses");
    chk(n_edrop > 0, "unpaired edges dropped");
    chk(n_trig > 0, "trigger emulation used");
    chk(n_rej > 0, "TOT filter rejected");
    chk(n_lost > 0 && stim.nflag_ovf > 0, "overflow happened and was flagged");
    chk(n_stall > 0, "mergers stalled");
    chk(n_done >= NFR - 1, "delimiters rebuilt by the back merger");
    chk(n_mis == 0, "no frame mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
