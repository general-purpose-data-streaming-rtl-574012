// tb_str_tdc_full: the top at its default size (64 high-resolution channels
// with 192 taps, 32 low-resolution channels, 16-bit heartbeat counter, so one
// frame is 65536 cycles = 524 us). Every channel of both TDCs gets random
// pulses at about 1.8 MHz on average, close to the 8 Gbps internal bandwidth
// of one 64-bit word per clock. The run covers two complete frames; both
// output streams are checked word by word with tdc_tb_pkg::tdc_stim, no hit
// may be lost, and the high-resolution output must carry on average more than
// 0.9 words per clock while pulses arrive.
module tb_str_tdc_full;
  import str_tdc_pkg::*;
  import tdc_tb_pkg::*;
  localparam int HT = 192, HN = 64, LT = 8, LN = 32, FR = 1 << 16, NFR = 2;
  logic clk = 0, rst = 1;
  logic [HT-1:0] hr_taps [HN];
  logic [7:0] lr_samples [LN];
  logic hr_out_valid, lr_out_valid;
  word_t hr_out_data, lr_out_data;
  logic [6:0] hr_status;
  logic [5:0] lr_status;
  int checks = 0, failures = 0;

  str_tdc_top dut (
    .hr_clk(clk), .hr_rst(rst), .hr_taps, .hr_sync_en(1'b0), .hr_sync_beat(1'b0), .hr_sync_frame('0),
    .hr_trig_mode(1'b0), .hr_trigger(1'b0), .hr_gate_width(16'd0), .hr_tot_en(1'b0),
    .hr_tot_min(16'd0), .hr_tot_max(16'hFFFF),
    .hr_out_valid, .hr_out_data, .hr_out_ready(1'b1), .hr_status,
    .lr_clk(clk), .lr_rst(rst), .lr_samples, .lr_sync_en(1'b0), .lr_sync_beat(1'b0), .lr_sync_frame('0),
    .lr_trig_mode(1'b0), .lr_trigger(1'b0), .lr_gate_width(16'd0), .lr_tot_en(1'b0),
    .lr_tot_min(16'd0), .lr_tot_max(16'hFFFF),
    .lr_out_valid, .lr_out_data, .lr_out_ready(1'b1), .lr_status
  );
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  tdc_stim hs, ls;
  int k, lost, hr_words, busy_cycles;
  bit started = 0;
  initial begin
    hs = new(HT, HN, FR, 0, (65536 / HT) - 1);
    hs.gen(2, NFR * FR - 2000, 64, 1'b0);
    ls = new(LT, LN, FR, 0, (65536 / LT) - 1);
    ls.gen(2, NFR * FR - 2000, 64, 1'b0);
    for (int c = 0; c < HN; c++) hr_taps[c] = '0;
    for (int c = 0; c < LN; c++) lr_samples[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0; k = 0; started = 1;
    forever begin
      for (int c = 0; c < HN; c++) hr_taps[c] = HT'(hs.taps(c, k));
      for (int c = 0; c < LN; c++) lr_samples[c] = LT'(ls.taps(c, k));
      @(negedge clk);
      k++;
    end
  end

  always @(posedge clk) if (started) begin
    if (hr_out_valid) begin chk(hs.take(hr_out_data), "HR stream word"); hr_words++; end
    if (lr_out_valid) chk(ls.take(lr_out_data), "LR stream word");
    if (hr_status[0] || lr_status[0]) lost++;
    if (k >= 1000 && k < NFR * FR - 3000) busy_cycles++;
  end

  initial begin
    lost = 0; hr_words = 0; busy_cycles = 0;
    wait (started && hs.cur_f == NFR && ls.cur_f == NFR);
    $display("cycles %0d: HR hits %0d, LR hits %0d, HR words %0d, lost events %0d",
             k, hs.nhits, ls.nhits, hr_words, lost);
    chk(hs.nframes == NFR && ls.nframes == NFR, "two complete frames on both sides");
    chk(lost == 0 && hs.nmiss == 0 && ls.nmiss == 0, "no hit lost");
    chk(real'(hs.nhits) / real'(k) > 0.9, $sformatf("HR output load %0.3f words/clock", real'(hs.nhits) / real'(k)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
