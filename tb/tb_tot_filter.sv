// tb_tot_filter: random hits through the TOT window, disabled and enabled;
// checks pass/reject decisions and the one-cycle latency against the window
// rule computed in the testbench.
module tb_tot_filter;
  import str_tdc_pkg::*;
  logic clk = 0, rst = 1;
  logic enable = 0;
  logic [TOT_W-1:0] tot_min = 16'd100, tot_max = 16'd400;
  logic in_valid = 0;
  tstamp_t in_time = '0;
  logic [TOT_W-1:0] in_tot = '0;
  logic out_valid, rejected;
  tstamp_t out_time;
  logic [TOT_W-1:0] out_tot;
  int checks = 0, failures = 0;

  tot_filter dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit exp_v, exp_r, pv;
  tstamp_t pt; logic [TOT_W-1:0] ptot;
  int passed, rej;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    passed = 0; rej = 0;
    for (int i = 0; i < 400; i++) begin
      enable   = (i >= 100);
      in_valid = $urandom % 2;
      in_time  = tstamp_t'($urandom);
      in_tot   = TOT_W'($urandom % 600);
      pv = in_valid; pt = in_time; ptot = in_tot;
      exp_v = pv && (!enable || (ptot >= tot_min && ptot <= tot_max));
      exp_r = pv && !exp_v;
      @(negedge clk);
      chk(out_valid == exp_v && rejected == exp_r, $sformatf("decision tot=%0d en=%0d", ptot, enable));
      if (exp_v) chk(out_time == pt && out_tot == ptot, "data passes unchanged");
      if (exp_v) passed++;
      if (exp_r) rej++;
    end
    chk(passed > 50 && rej > 50, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
