// str_hrtdc: streaming high-resolution TDC, 64 channels (32 + 32).
//
// The TDC is split over three FPGAs. Each of the two mezzanine cards holds 32
// tapped-delay-line channels, their TDC blocks and a front merger
// (str_tdc_group); the base board holds its own heartbeat unit and the back
// merger, which combines the two mezzanine streams into the stream sent to
// the TCP/IP link. Every FPGA runs a heartbeat unit: the base board's unit
// follows the upstream clock distribution (sync_en / sync_beat / sync_frame)
// or free-runs when stand-alone, and both mezzanine units follow the base
// board's heartbeat, so all channels close a frame in the same cycle.
//
// Interface: taps[c] carries one clock period of delay-line samples of channel
// c (TAPS per 8 ns period, tap 0 newest); channels 0-31 are on mezzanine 0,
// 32-63 on mezzanine 1. The output is a valid/ready stream of 64-bit words
// (hit words and one delimiter per frame); a word moves when out_valid and
// out_ready are both high. Status outputs pulse for events in any channel.
//
// The partitioning, channel count and heartbeat arrangement follow the
// document. The links between the FPGAs are modelled as direct wires with no
// added latency, and the tap count (TAPS = 192, about 42 ps per tap at
// 125 MHz) is this design's choice. The delay-line primitives themselves are
// outside this module: it starts at the sampled taps.
module str_hrtdc
  import str_tdc_pkg::*;
#(
  parameter int unsigned N_MEZZ        = 2,
  parameter int unsigned CH_PER_MEZZ   = 32,
  parameter int unsigned TAPS          = 192,
  parameter int unsigned CNT_W         = HB_W,
  parameter int unsigned CH_FIFO_DEPTH = 32,
  parameter int unsigned FRONT_DEPTH   = 128,
  parameter int unsigned BACK_DEPTH    = 256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [TAPS-1:0]    taps [N_MEZZ*CH_PER_MEZZ],
  input  logic               sync_en,
  input  logic               sync_beat,
  input  logic [FRAME_W-1:0] sync_frame,
  input  logic               trig_mode,
  input  logic               trigger,
  input  logic [15:0]        gate_width,
  input  logic               tot_en,
  input  logic [TOT_W-1:0]   tot_min,
  input  logic [TOT_W-1:0]   tot_max,
  output logic               out_valid,
  output word_t              out_data,
  input  logic               out_ready,
  output logic               hit_lost,
  output logic               edge_dropped,
  output logic               tot_rejected,
  output logic               merge_stall,
  output logic               frame_mismatch,
  output logic               frame_done,
  output logic               trig_accepted
);

  // base-board heartbeat unit (master of the mezzanines)
  logic [CNT_W-1:0]   hb_count;
  logic [FRAME_W-1:0] hb_frame, beat_frame;
  logic               beat, beat_resync;

  heartbeat_unit #(.CNT_W(CNT_W), .FRAME_W(FRAME_W)) u_hb (
    .clk, .rst, .sync_en, .sync_beat, .sync_frame,
    .hb_count, .frame(hb_frame), .beat, .beat_frame, .beat_resync
  );

  logic [N_MEZZ-1:0] m_empty, m_rd, m_lost, m_edrop, m_rej, m_stall, m_mis, m_trig;
  word_t             m_data [N_MEZZ];

  for (genvar m = 0; m < N_MEZZ; m++) begin : g_mezz
    logic [TAPS-1:0] mtaps [CH_PER_MEZZ];
    for (genvar c = 0; c < CH_PER_MEZZ; c++) begin : g_map
      assign mtaps[c] = taps[m*CH_PER_MEZZ + c];
    end
    str_tdc_group #(
      .N_CH(CH_PER_MEZZ), .TAPS(TAPS), .CNT_W(CNT_W), .CH_BASE(CH_W'(m*CH_PER_MEZZ)),
      .CH_FIFO_DEPTH(CH_FIFO_DEPTH), .OUT_DEPTH(FRONT_DEPTH)
    ) u_mezz (
      .clk, .rst, .taps(mtaps),
      .sync_en(1'b1), .sync_beat(beat), .sync_frame(beat_frame),
      .trig_mode, .trigger, .gate_width, .tot_en, .tot_min, .tot_max,
      .out_rd_en(m_rd[m]), .out_data(m_data[m]), .out_empty(m_empty[m]),
      .beat(), .frame(), .any_hit_lost(m_lost[m]), .any_edge_dropped(m_edrop[m]),
      .any_tot_rejected(m_rej[m]), .merge_stall(m_stall[m]), .delim_merged(),
      .frame_mismatch(m_mis[m]), .trig_accepted(m_trig[m])
    );
  end

  logic  b_empty, b_stall, b_mis, b_delim;

  merger #(.N_IN(N_MEZZ), .OUT_DEPTH(BACK_DEPTH)) u_back (
    .clk, .rst, .in_empty(m_empty), .in_data(m_data), .in_rd_en(m_rd),
    .out_rd_en(out_valid && out_ready), .out_data, .out_empty(b_empty),
    .stall(b_stall), .delim_merged(b_delim), .frame_mismatch(b_mis)
  );

  assign out_valid      = !b_empty;
  assign hit_lost       = |m_lost;
  assign edge_dropped   = |m_edrop;
  assign tot_rejected   = |m_rej;
  assign merge_stall    = (|m_stall) || b_stall;
  assign frame_mismatch = (|m_mis) || b_mis;
  assign frame_done     = b_delim;
  assign trig_accepted  = m_trig[0];

endmodule
