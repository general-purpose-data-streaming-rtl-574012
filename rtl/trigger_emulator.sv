// trigger_emulator: event gate for the trigger emulation mode.
//
// In the normal streaming mode every hit is sent (gate stays open). For
// experiments whose computers cannot take the full stream, or which also run
// front ends that need a hardware trigger, the TDC can emulate a triggered
// system: after a trigger arrives an event gate opens for gate_width clock
// cycles, and only hits that reach the channel while it is open are kept. A
// trigger while the gate is open restarts it. Heartbeat delimiters are never
// gated, so the frame structure of the stream is the same in both modes.
//
// Interface and timing: trigger is a one-cycle pulse in the clock domain; gate
// is registered and opens the cycle after the trigger. trig_accepted pulses for
// every trigger seen in trigger mode. The gate-after-trigger behaviour is the
// document's; the gate length register and retrigger rule are this design's.
module trigger_emulator #(
  parameter int unsigned WIDTH_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               trig_mode,
  input  logic               trigger,
  input  logic [WIDTH_W-1:0] gate_width,
  output logic               gate,
  output logic               trig_accepted
);

  logic [WIDTH_W-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining     <= '0;
      trig_accepted <= 1'b0;
    end else begin
      trig_accepted <= trig_mode && trigger;
      if (trig_mode && trigger)  remaining <= gate_width;
      else if (remaining != '0)  remaining <= remaining - 1'b1;
    end
  end

  assign gate = !trig_mode || (remaining != '0);

endmodule
