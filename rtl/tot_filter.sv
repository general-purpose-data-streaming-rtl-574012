// tot_filter: keeps or drops paired hits by their time-over-threshold.
//
// Pairing leading and trailing edges gives each hit a TOT, which is a rough
// measure of the pulse height; a cut on it removes noise hits (too short) and
// stuck or overlapping pulses (too long) before they take bandwidth. With
// enable = 1 a hit passes only if tot_min <= TOT <= tot_max; with enable = 0
// every hit passes. Each rejected hit pulses `rejected` for one cycle.
//
// Timing: one register stage, out_* one cycle after in_*. The idea of a TOT
// filter is the document's; the window form and the programmable limits are
// this design's own choice.
module tot_filter
  import str_tdc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [TOT_W-1:0] tot_min,
  input  logic [TOT_W-1:0] tot_max,
  input  logic             in_valid,
  input  tstamp_t          in_time,
  input  logic [TOT_W-1:0] in_tot,
  output logic             out_valid,
  output tstamp_t          out_time,
  output logic [TOT_W-1:0] out_tot,
  output logic             rejected
);

  logic pass;
  assign pass = !enable || (in_tot >= tot_min && in_tot <= tot_max);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_time  <= '0;
      out_tot   <= '0;
      rejected  <= 1'b0;
    end else begin
      out_valid <= in_valid && pass;
      rejected  <= in_valid && !pass;
      out_time  <= in_time;
      out_tot   <= in_tot;
    end
  end

endmodule
