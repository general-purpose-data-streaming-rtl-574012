// tb_str_tdc_top: end-to-end test of the top with both TDCs running at once at
// reduced size (8 high-resolution channels with 192 taps, 8 low-resolution
// channels with 8 samples, 512-cycle frames). The high-resolution side
// free-runs; the low-resolution side follows an upstream heartbeat. Both
// streams are checked with tdc_tb_pkg::tdc_stim. Every mechanism of the design
// must be seen at least once: heartbeat delimiter rebuilt by the mergers,
// short pulse (both edges in one clock), pairing timeout / unpaired edge,
// TOT cut, trigger-emulation gate, merger stall under back-pressure, buffer
// overflow flagged in a delimiter, and follower heartbeat.
module tb_str_tdc_top;
  import str_tdc_pkg::*;
  import tdc_tb_pkg::*;
  localparam int HT = 192, HN = 8, LT = 8, LN = 8, CW = 9, FR = 1 << CW, NFR = 14, GW = 40;
  logic clk = 0, rst = 1;
  logic [HT-1:0] hr_taps [HN];
  logic [7:0] lr_samples [LN];
  logic hr_sync_beat = 0, lr_sync_beat = 0;
  logic [FRAME_W-1:0] lr_sync_frame = '0;
  logic hr_trig_mode = 0, hr_trigger = 0, hr_tot_en = 0, hr_out_ready = 0, hr_out_valid;
  logic lr_trig_mode = 0, lr_trigger = 0, lr_tot_en = 0, lr_out_ready = 0, lr_out_valid;
  word_t hr_out_data, lr_out_data;
  logic [6:0] hr_status;
  logic [5:0] lr_status;
  int checks = 0, failures = 0;

  str_tdc_top #(.HR_TAPS(HT), .HR_CH(HN), .LR_CH(LN), .CNT_W(CW)) dut (
    .hr_clk(clk), .hr_rst(rst), .hr_taps, .hr_sync_en(1'b0), .hr_sync_beat, .hr_sync_frame('0),
    .hr_trig_mode, .hr_trigger, .hr_gate_width(16'(GW)), .hr_tot_en,
    .hr_tot_min(16'd400), .hr_tot_max(16'd1200),
    .hr_out_valid, .hr_out_data, .hr_out_ready, .hr_status,
    .lr_clk(clk), .lr_rst(rst), .lr_samples, .lr_sync_en(1'b1), .lr_sync_beat, .lr_sync_frame,
    .lr_trig_mode, .lr_trigger, .lr_gate_width(16'(GW)), .lr_tot_en,
    .lr_tot_min(16'd15), .lr_tot_max(16'd45),
    .lr_out_valid, .lr_out_data, .lr_out_ready, .lr_status
  );
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit tot_phase(int f);  return f >= 2 && f < 4; endfunction
  function automatic bit trig_phase(int f); return f >= 5 && f < 7; endfunction
  function automatic bit stop_phase(int f); return f >= 8 && f < 10; endfunction

  tdc_stim hs, ls;
  int k, h_last, l_last;
  int cnt [string];
  bit started = 0;
  initial begin
    hs = new(HT, HN, FR, 0, (65536 / HT) - 1);
    hs.tot_min = 400; hs.tot_max = 1200;
    hs.gen(2, (NFR - 3) * FR, 5, 1'b1);
    ls = new(LT, LN, FR, 0, (65536 / LT) - 1);
    ls.tot_min = 15; ls.tot_max = 45;
    ls.gen(2, (NFR - 3) * FR, 5, 1'b0);
    for (int c = 0; c < HN; c++) hr_taps[c] = '0;
    for (int c = 0; c < LN; c++) lr_samples[c] = '0;
    h_last = -1000; l_last = -1000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0; k = 0; started = 1;
    forever begin
      for (int c = 0; c < HN; c++) hr_taps[c] = HT'(hs.taps(c, k));
      for (int c = 0; c < LN; c++) lr_samples[c] = LT'(ls.taps(c, k));
      lr_sync_beat  = (k % FR) == FR - 1;
      lr_sync_frame = FRAME_W'(k / FR);
      hr_tot_en = tot_phase((k - 2) / FR);      lr_tot_en = hr_tot_en;
      hr_trig_mode = trig_phase((k - 3) / FR);  lr_trig_mode = hr_trig_mode;
      hr_trigger = hr_trig_mode && ($urandom % 60 == 0);
      lr_trigger = lr_trig_mode && ($urandom % 60 == 0);
      hr_out_ready = !stop_phase(k / FR) && ($urandom % 4 != 0);
      lr_out_ready = !stop_phase(k / FR) && ($urandom % 3 != 0);
      hs.note(k, hr_tot_en, !hr_trig_mode || (k >= h_last + 1 && k <= h_last + GW));
      ls.note(k, lr_tot_en, !lr_trig_mode || (k >= l_last + 1 && k <= l_last + GW));
      if (hr_trigger) h_last = k;
      if (lr_trigger) l_last = k;
      @(negedge clk);
      k++;
    end
  end

  always @(posedge clk) if (started) begin
    if (hr_out_valid && hr_out_ready) chk(hs.take(hr_out_data), "HR stream word");
    if (lr_out_valid && lr_out_ready) chk(ls.take(lr_out_data), "LR stream word");
    if (hr_status[0] || lr_status[0]) cnt["overflow"]++;
    if (hr_status[1]) cnt["unpaired_edge"]++;
    if (hr_status[2] || lr_status[2]) cnt["tot_cut"]++;
    if (hr_status[3] || lr_status[3]) cnt["merge_stall"]++;
    if (hr_status[4]) cnt["frame_mismatch"]++;
    if (hr_status[5] || lr_status[4]) cnt["delimiter_rebuilt"]++;
    if (hr_status[6] || lr_status[5]) cnt["trigger"]++;
    if (lr_sync_beat) cnt["follower_beat"]++;
  end

  initial begin
    wait (started && hs.cur_f == NFR - 1 && ls.cur_f >= NFR - 1);
    cnt["short_pulse"] = hs.nshort + ls.nshort;
    cnt["long_pulse"] = hs.nlong;
    cnt["hits"] = hs.nhits + ls.nhits;
    cnt["overflow_frames"] = hs.nflag_ovf + ls.nflag_ovf;
    foreach (cnt[s]) $display("mechanism %-18s %0d", s, cnt[s]);
    foreach (cnt[s]) if (s != "frame_mismatch") chk(cnt[s] > 0, {"never happened: ", s});
    chk(!cnt.exists("frame_mismatch"), "no frame mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
