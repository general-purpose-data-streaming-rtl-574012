// tb_trigger_emulator: in streaming mode the gate is always open; in trigger
// emulation mode it opens the cycle after a trigger for exactly gate_width
// cycles, and a trigger during the gate restarts it.
module tb_trigger_emulator;
  logic clk = 0, rst = 1;
  logic trig_mode = 0, trigger = 0;
  logic [15:0] gate_width = 16'd10;
  logic gate, trig_accepted;
  int checks = 0, failures = 0;

  trigger_emulator dut (.*);
  always #4 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int open_cycles;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) begin chk(gate, "streaming mode: gate open"); @(negedge clk); end
    trigger = 1; @(negedge clk); trigger = 0;      // ignored in streaming mode
    chk(!trig_accepted, "trigger ignored in streaming mode");
    trig_mode = 1;
    repeat (5) begin #1; chk(!gate, $sformatf("trigger mode: gate closed t=%0t", $time)); @(negedge clk); end
    trigger = 1; @(negedge clk); trigger = 0;
    chk(trig_accepted, "trigger accepted");
    open_cycles = 0;
    repeat (20) begin if (gate) open_cycles++; @(negedge clk); end
    chk(open_cycles == 10, $sformatf("gate length %0d", open_cycles));
    // retrigger after 6 cycles -> 6 + 10 open cycles
    gate_width = 16'd7;
    trigger = 1; @(negedge clk); trigger = 0;
    open_cycles = 0;
    repeat (3) begin if (gate) open_cycles++; @(negedge clk); end
    trigger = 1; @(negedge clk); trigger = 0;
    repeat (20) begin if (gate) open_cycles++; @(negedge clk); end
    chk(open_cycles == 3 + 7, $sformatf("retrigger gate length %0d", open_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
