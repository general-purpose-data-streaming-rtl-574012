// heartbeat_unit: heartbeat counter and frame number of one FPGA.
//
// The streaming TDC does not keep a long local timestamp. Instead a short
// heartbeat counter (16 bits) runs on the system clock and every time it
// wraps a heartbeat ends the current frame; the frame number (24 bits) counts
// the frames. A delimiter word carrying the frame number is inserted in the
// data stream at each heartbeat, so the full time of a hit is
// frame number, heartbeat count and fine count together (about 2.4 hours at
// 125 MHz before the frame number wraps).
//
// Stand-alone (sync_en = 0) the unit free-runs and beats when the counter is
// at its last value. With sync_en = 1 it is a follower of the upstream FPGA:
// a beat happens exactly when sync_beat arrives, the frame number is taken
// from sync_frame and the counter restarts at 0. If the local counter was not
// at its last value at that moment the beat is marked as a resynchronisation.
//
// Interface and timing:
//   beat        high during the last cycle of a frame (combinational from
//               sync_beat in follower mode)
//   beat_frame  number of the frame that ends with this beat
//   beat_resync the local counter was realigned by this beat
//   hb_count    heartbeat count of the current cycle (0 in the first cycle
//               of a frame), frame the current frame number
// The counter width and frame width follow the document; the follower
// behaviour (restart on the upstream beat) is this design's own choice.
module heartbeat_unit #(
  parameter int unsigned CNT_W   = str_tdc_pkg::HB_W,
  parameter int unsigned FRAME_W = str_tdc_pkg::FRAME_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sync_en,
  input  logic               sync_beat,
  input  logic [FRAME_W-1:0] sync_frame,
  output logic [CNT_W-1:0]   hb_count,
  output logic [FRAME_W-1:0] frame,
  output logic               beat,
  output logic [FRAME_W-1:0] beat_frame,
  output logic               beat_resync
);

  localparam logic [CNT_W-1:0] LAST = '1;

  always_comb begin
    if (sync_en) begin
      beat        = sync_beat;
      beat_frame  = sync_frame;
      beat_resync = sync_beat && (hb_count != LAST || frame != sync_frame);
    end else begin
      beat        = (hb_count == LAST);
      beat_frame  = frame;
      beat_resync = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hb_count <= '0;
      frame    <= '0;
    end else if (beat) begin
      hb_count <= '0;
      frame    <= beat_frame + 1'b1;
    end else begin
      hb_count <= hb_count + 1'b1;
    end
  end

endmodule
