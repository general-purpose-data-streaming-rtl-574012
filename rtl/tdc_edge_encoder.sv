// tdc_edge_encoder: finds the leading and trailing edge of one channel in one
// clock period of delay-line (or oversampled) taps and timestamps them.
//
// The input is the channel's signal sampled at TAPS points spread over one
// system clock period: taps[0] is the newest sample (taken at the clock edge),
// taps[TAPS-1] the oldest. For the high-resolution TDC these are the outputs of
// a tapped delay line made of carry primitives; for the 1 ns low-resolution TDC
// they are 8 samples per 8 ns clock. The newest sample of the previous period
// is kept, so an edge right at the period boundary is not missed.
//
// A leading edge is a 0 -> 1 step from an older sample to the next newer one,
// a trailing edge a 1 -> 0 step. For each kind the oldest step in the period
// is reported; a second pulse inside the same 8 ns period is not seen.
// The fine count is the number of taps from the previous clock edge to the
// edge, 0 .. TAPS-1; the coarse count is the heartbeat count of the capturing
// clock. The time of an edge in tap units is therefore coarse*TAPS + fine
// (plus a constant). Tap delays are taken as equal: bin-width calibration is
// not part of this block.
//
// Timing: outputs are registered, one cycle after the taps. Both edge
// detection and timestamp format follow the document (both edges, heartbeat
// count + fine count); the oldest-step rule is this design's own choice.
module tdc_edge_encoder
  import str_tdc_pkg::*;
#(
  parameter int unsigned TAPS = 192
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [TAPS-1:0] taps,
  input  logic [HB_W-1:0] coarse,
  output logic            le_valid,
  output tstamp_t         le_time,
  output logic            te_valid,
  output tstamp_t         te_time
);

  initial assert (TAPS >= 2 && TAPS <= (1 << FINE_W))
    else $error("TAPS must fit the fine-count field");

  logic              prev_newest;
  logic [TAPS:0]     ext;           // ext[TAPS] is the newest sample of the last period
  logic              rise_found, fall_found;
  logic [FINE_W-1:0] rise_fine, fall_fine;

  assign ext = {prev_newest, taps};

  always_comb begin
    rise_found = 1'b0;
    fall_found = 1'b0;
    rise_fine  = '0;
    fall_fine  = '0;
    // scan from newest to oldest so the oldest step wins
    for (int j = 0; j < TAPS; j++) begin
      if (ext[j] && !ext[j+1]) begin
        rise_found = 1'b1;
        rise_fine  = FINE_W'(TAPS - 1 - j);
      end
      if (!ext[j] && ext[j+1]) begin
        fall_found = 1'b1;
        fall_fine  = FINE_W'(TAPS - 1 - j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_newest <= 1'b0;
      le_valid    <= 1'b0;
      te_valid    <= 1'b0;
      le_time     <= '0;
      te_time     <= '0;
    end else begin
      prev_newest    <= taps[0];
      le_valid       <= rise_found;
      te_valid       <= fall_found;
      le_time.coarse <= coarse;
      le_time.fine   <= rise_fine;
      te_time.coarse <= coarse;
      te_time.fine   <= fall_fine;
    end
  end

endmodule
