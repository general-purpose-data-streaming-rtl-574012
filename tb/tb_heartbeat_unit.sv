// tb_heartbeat_unit: checks the heartbeat counter and frame number.
// A 4-bit counter gives 16-cycle frames. Part 1 free-runs and compares the
// counter, the beat (last cycle of each frame) and the frame number with a
// reference count kept in the testbench. Part 2 switches to follower mode:
// an upstream beat arriving mid-frame must realign the counter (flagged as a
// resync), load the frame number, and an aligned beat must not be flagged.
module tb_heartbeat_unit;
  localparam int CW = 4;
  logic clk = 0, rst = 1;
  logic sync_en = 0, sync_beat = 0;
  logic [23:0] sync_frame = '0;
  logic [CW-1:0] hb_count;
  logic [23:0] frame, beat_frame;
  logic beat, beat_resync;
  int checks = 0, failures = 0;

  heartbeat_unit #(.CNT_W(CW)) dut (.*);

  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ref_cnt, ref_frame, beats;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    ref_cnt = 0; ref_frame = 0; beats = 0;
    // part 1: free running
    for (int cyc = 0; cyc < 100; cyc++) begin
      @(negedge clk);
      chk(hb_count == CW'(ref_cnt), $sformatf("count %0d exp %0d", hb_count, ref_cnt));
      chk(frame == 24'(ref_frame), "frame");
      chk(beat == (ref_cnt == 15), "beat position");
      if (beat) begin chk(beat_frame == 24'(ref_frame), "beat frame"); beats++; end
      chk(!beat_resync, "no resync free-running");
      ref_cnt++;
      if (ref_cnt == 16) begin ref_cnt = 0; ref_frame++; end
    end
    chk(beats == 6, $sformatf("beats in 100 cycles = %0d", beats));
    // part 2: follower, upstream beat mid-frame
    @(negedge clk);
    sync_en = 1;
    wait (hb_count == 5);
    @(negedge clk);
    sync_beat = 1; sync_frame = 24'h00ABCD;
    #1; chk(beat && beat_resync && beat_frame == 24'h00ABCD, "misaligned sync beat flagged");
    @(negedge clk);
    sync_beat = 0;
    chk(hb_count == 0 && frame == 24'h00ABCE, "realigned to upstream");
    // no local beat while following
    repeat (15) begin #1; chk(!beat, $sformatf("no local beat in follower mode cnt=%0d", hb_count)); @(negedge clk); end
    chk(hb_count == 15, "count at last value");
    sync_beat = 1; sync_frame = 24'h00ABCE;
    #1; chk(beat && !beat_resync, "aligned sync beat not flagged");
    @(negedge clk); sync_beat = 0;
    chk(frame == 24'h00ABCF && hb_count == 0, "next frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
