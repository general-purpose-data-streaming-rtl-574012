// tb_str_tdc_group: one FPGA's TDC part with 8 channels (TAPS = 16, 128-cycle
// frames, small FIFOs so they overflow). Random pulses on all channels; the
// merged stream is checked frame by frame against the prediction of
// tdc_tb_pkg::tdc_stim. Phases: streaming, TOT window on, trigger emulation
// with random triggers, output not read for three frames (channel FIFOs
// overflow, merger stalls). Each of these must be seen to happen.
module tb_str_tdc_group;
  import str_tdc_pkg::*;
  import tdc_tb_pkg::*;
  localparam int T = 16, N = 8, CW = 7, FR = 1 << CW, NFR = 32, BASE = 8, GW = 15;
  logic clk = 0, rst = 1;
  logic [T-1:0] taps [N];
  logic sync_en = 0, sync_beat = 0;
  logic [FRAME_W-1:0] sync_frame = '0;
  logic trig_mode = 0, trigger = 0, tot_en = 0;
  logic [15:0] gate_width = 16'(GW);
  logic [TOT_W-1:0] tot_min = 16'd40, tot_max = 16'd90;
  logic out_rd_en, out_empty, rd_want = 0;
  word_t out_data;
  logic beat, any_hit_lost, any_edge_dropped, any_tot_rejected, merge_stall, delim_merged,
        frame_mismatch, trig_accepted;
  logic [FRAME_W-1:0] frame;
  int checks = 0, failures = 0;

  str_tdc_group #(.N_CH(N), .TAPS(T), .CNT_W(CW), .CH_BASE(6'(BASE)),
                  .CH_FIFO_DEPTH(4), .OUT_DEPTH(8)) dut (.*);
  always #4 clk = ~clk;
  assign out_rd_en = rd_want && !out_empty;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit tot_phase(int f);  return f >= 5 && f < 9; endfunction
  function automatic bit trig_phase(int f); return f >= 12 && f < 16; endfunction
  function automatic bit stop_phase(int f); return f >= 20 && f < 23; endfunction

  tdc_stim stim;
  int k, last_trig, n_trig, n_rej, n_lost, n_stall, n_delim, n_mis;
  bit started = 0;
  initial begin
    stim = new(T, N, FR, BASE, 1 << 30);
    stim.tot_min = 40; stim.tot_max = 90;
    stim.gen(2, (NFR - 3) * FR, 6, 1'b0);
    for (int c = 0; c < N; c++) taps[c] = '0;
    last_trig = -1000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0; k = 0; started = 1;
    forever begin
      // drive cycle k
      for (int c = 0; c < N; c++) taps[c] = T'(stim.taps(c, k));
      tot_en    = tot_phase((k - 2) / FR);
      trig_mode = trig_phase((k - 3) / FR);
      trigger   = trig_mode && ($urandom % 40 == 0);
      rd_want   = !stop_phase(k / FR) && ($urandom % 3 != 0);
      stim.note(k, tot_en, !trig_mode || (k >= last_trig + 1 && k <= last_trig + GW));
      if (trigger) last_trig = k;
      @(negedge clk);
      k++;
    end
  end

  always @(posedge clk) if (started) begin
    if (out_rd_en) chk(stim.take(out_data), "stream word");
    if (trig_accepted) n_trig++;
    if (any_tot_rejected) n_rej++;
    if (any_hit_lost) n_lost++;
    if (merge_stall) n_stall++;
    if (delim_merged) n_delim++;
    if (frame_mismatch) n_mis++;
  end

  initial begin
    n_trig = 0; n_rej = 0; n_lost = 0; n_stall = 0; n_delim = 0; n_mis = 0;
    wait (started && stim.cur_f == NFR - 1);
    $display("hits %0d frames %0d missed %0d ovf-frames %0d short %0d trig %0d rej %0d lost %0d stall %0d",
             stim.nhits, stim.nframes, stim.nmiss, stim.nflag_ovf, stim.nshort, n_trig, n_rej, n_lost, n_stall);
    chk(stim.nhits > 500, "hits flowed");
    chk(stim.nshort > 0, "short pulses");
    chk(n_trig > 0, "trigger emulation used");
    chk(n_rej > 0, "TOT filter rejected");
    chk(n_lost > 0 && stim.nmiss > 0 && stim.nflag_ovf > 0, "overflow happened and was flagged");
    chk(n_stall > 0, "merger stalled");
    chk(n_delim >= NFR - 1, "delimiters rebuilt");
    chk(n_mis == 0, "no frame mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
