// tb_str_lrtdc: the 1 ns low-resolution TDC with 8 channels, 8 samples per
// clock and 256-cycle frames, its heartbeat following an upstream beat
// (sync_en = 1) sent every 256 cycles. The stream is checked end to end with
// tdc_tb_pkg::tdc_stim through a TOT window phase, a trigger-emulation phase
// and a phase with the output not ready.
module tb_str_lrtdc;
  import str_tdc_pkg::*;
  import tdc_tb_pkg::*;
  localparam int T = 8, N = 8, CW = 8, FR = 1 << CW, NFR = 24, GW = 30;
  logic clk = 0, rst = 1;
  logic [T-1:0] samples [N];
  logic sync_en = 1, sync_beat = 0;
  logic [FRAME_W-1:0] sync_frame = '0;
  logic trig_mode = 0, trigger = 0, tot_en = 0;
  logic [15:0] gate_width = 16'(GW);
  logic [TOT_W-1:0] tot_min = 16'd15, tot_max = 16'd45;
  logic out_valid, out_ready = 0;
  word_t out_data;
  logic hit_lost, edge_dropped, tot_rejected, merge_stall, frame_done, trig_accepted;
  int checks = 0, failures = 0;

  str_lrtdc #(.N_CH(N), .SAMPLES(T), .CNT_W(CW), .CH_FIFO_DEPTH(4), .OUT_DEPTH(8)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit tot_phase(int f);  return f >= 4 && f < 7; endfunction
  function automatic bit trig_phase(int f); return f >= 9 && f < 12; endfunction
  function automatic bit stop_phase(int f); return f >= 15 && f < 17; endfunction

  tdc_stim stim;
  int k, last_trig, n_trig, n_rej, n_lost, n_stall, n_done, n_sync;
  bit started = 0;
  initial begin
    stim = new(T, N, FR, 0, (65536 / T) - 1);
    stim.tot_min = 15; stim.tot_max = 45;
    stim.gen(2, (NFR - 3) * FR, 5, 1'b0);
    for (int c = 0; c < N; c++) samples[c] = '0;
    last_trig = -1000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0; k = 0; started = 1;
    forever begin
      for (int c = 0; c < N; c++) samples[c] = T'(stim.taps(c, k));
      sync_beat  = (k % FR) == FR - 1;       // upstream heartbeat
      sync_frame = FRAME_W'(k / FR);
      tot_en    = tot_phase((k - 2) / FR);
      trig_mode = trig_phase((k - 3) / FR);
      trigger   = trig_mode && ($urandom % 50 == 0);
      out_ready = !stop_phase(k / FR) && ($urandom % 3 != 0);
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
    if (sync_beat) n_sync++;
  end

  initial begin
    n_trig = 0; n_rej = 0; n_lost = 0; n_stall = 0; n_done = 0; n_sync = 0;
    wait (started && stim.cur_f == NFR - 1);
    $display("hits %0d frames %0d missed %0d ovf-frames %0d short %0d trig %0d rej %0d lost %0d stall %0d",
             stim.nhits, stim.nframes, stim.nmiss, stim.nflag_ovf, stim.nshort, n_trig, n_rej, n_lost, n_stall);
    chk(stim.nhits > 300, "hits flowed");
    chk(stim.nshort > 0, "short pulses");
    chk(n_sync > 0, "upstream heartbeats followed");
    chk(n_trig > 0, "trigger emulation used");
    chk(n_rej > 0, "TOT filter rejected");
    chk(n_lost > 0 && stim.nflag_ovf > 0, "overflow happened and was flagged");
    chk(n_stall > 0, "merger stalled");
    chk(n_done >= NFR - 1, "delimiters rebuilt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
