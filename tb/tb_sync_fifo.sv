// tb_sync_fifo: random writes and reads against a queue model; checks the
// head word, empty/full flags, count, and that one word per cycle can pass
// through with simultaneous read and write.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int streamed;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // compare flags and head with the model
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      chk(int'(count) == model.size(), "count");
      if (model.size() > 0) chk(dout == model[0], $sformatf("head %h exp %h", dout, model[0]));
      wr_en = ($urandom % 100) < (cyc < 1500 ? 60 : 40) && !full;
      rd_en = ($urandom % 100) < 50 && !empty;
      din   = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
      @(negedge clk);
    end
    // rate: fill half, then read and write every cycle
    wr_en = 0; rd_en = 0;
    while (model.size() < 4) begin
      wr_en = 1; din = W'($urandom); @(posedge clk); model.push_back(din); @(negedge clk);
    end
    streamed = 0;
    for (int i = 0; i < 50; i++) begin
      wr_en = 1; rd_en = 1; din = W'(i);
      chk(dout == model[0], "streaming head");
      @(posedge clk); void'(model.pop_front()); model.push_back(din); streamed++;
      @(negedge clk);
    end
    chk(int'(count) == 4 && streamed == 50, "one word per cycle in and out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
