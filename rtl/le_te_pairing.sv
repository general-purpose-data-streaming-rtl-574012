// le_te_pairing: pairs each leading edge of a channel with the trailing edge
// that follows it and emits one hit: the leading-edge time plus the
// time-over-threshold (TOT). Sending one paired word instead of two edge words
// halves the data volume and makes a TOT cut possible further down.
//
// Rules, per clock cycle (at most one leading and one trailing edge arrive):
//   * a trailing edge closes the open leading edge if it is later than it;
//     TOT = (te.coarse - le.coarse) * TAPS + te.fine - le.fine, in tap units;
//   * a leading and a trailing edge in the same cycle with the trailing one
//     later form a hit on their own (a pulse shorter than one clock period);
//   * a trailing edge with no open leading edge is dropped;
//   * a new leading edge while one is still open replaces it (the older one is
//     dropped), as does a leading edge left open for MAX_TOT_CYCLES cycles.
// Each drop pulses `dropped` for one cycle.
//
// Timing: hit_valid/hit_time/hit_tot are registered, one cycle after the
// edges. Pairing itself is what the document describes; the timeout and the
// drop rules are this design's own choices. CNT_W is the width of the
// heartbeat counter actually in use, so coarse differences wrap correctly.
module le_te_pairing
  import str_tdc_pkg::*;
#(
  parameter int unsigned TAPS           = 192,
  parameter int unsigned CNT_W          = HB_W,
  parameter int unsigned MAX_TOT_CYCLES = ((1 << TOT_W) / TAPS) - 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             le_valid,
  input  tstamp_t          le_time,
  input  logic             te_valid,
  input  tstamp_t          te_time,
  output logic             hit_valid,
  output tstamp_t          hit_time,
  output logic [TOT_W-1:0] hit_tot,
  output logic             dropped
);

  localparam logic [HB_W-1:0] CNT_MASK = HB_W'((1 << CNT_W) - 1);
  localparam int unsigned AGE_W = $clog2(MAX_TOT_CYCLES + 1);

  logic             open_q;
  tstamp_t          open_time;
  logic [AGE_W-1:0] age;

  function automatic logic [TOT_W-1:0] tot_of(tstamp_t le, tstamp_t te);
    logic [HB_W-1:0] dc;
    dc = (te.coarse - le.coarse) & CNT_MASK;
    return TOT_W'(dc * TAPS) + TOT_W'(te.fine) - TOT_W'(le.fine);
  endfunction

  logic te_after_le;   // same cycle, trailing edge later than leading edge
  assign te_after_le = le_valid && te_valid && (te_time.fine > le_time.fine);

  always_ff @(posedge clk) begin
    if (rst) begin
      open_q    <= 1'b0;
      open_time <= '0;
      age       <= '0;
      hit_valid <= 1'b0;
      hit_time  <= '0;
      hit_tot   <= '0;
      dropped   <= 1'b0;
    end else begin
      hit_valid <= 1'b0;
      dropped   <= 1'b0;
      if (te_after_le) begin
        // short pulse inside one period; any open edge is stale
        hit_valid <= 1'b1;
        hit_time  <= le_time;
        hit_tot   <= tot_of(le_time, te_time);
        dropped   <= open_q;
        open_q    <= 1'b0;
      end else begin
        if (te_valid) begin
          if (open_q) begin
            hit_valid <= 1'b1;
            hit_time  <= open_time;
            hit_tot   <= tot_of(open_time, te_time);
          end else begin
            dropped <= 1'b1;
          end
          open_q <= 1'b0;
        end
        if (le_valid) begin
          if (open_q && !te_valid) dropped <= 1'b1;
          open_q    <= 1'b1;
          open_time <= le_time;
          age       <= '0;
        end else if (!te_valid && open_q) begin
          if (age == AGE_W'(MAX_TOT_CYCLES)) begin
            open_q  <= 1'b0;
            dropped <= 1'b1;
          end else begin
            age <= age + 1'b1;
          end
        end
      end
    end
  end

endmodule
