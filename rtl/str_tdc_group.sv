// str_tdc_group: the TDC side of one FPGA: N_CH TDC channels, their heartbeat
// unit, the trigger emulator and the front merger.
//
// In the high-resolution TDC this is the firmware of one mezzanine card
// (32 tapped-delay-line channels); in the low-resolution TDC it is the whole
// TDC part of the board with 8 samples per clock (1 ns). The heartbeat unit
// follows the upstream FPGA when sync_en is set (sync_beat / sync_frame) and
// free-runs otherwise. Every channel receives the same heartbeat, event gate
// and TOT window; the front merger combines the channel FIFOs into one stream
// with one delimiter per frame.
//
// Interface: taps[i] is one clock period of samples of channel i (tap 0
// newest). The merged stream is the read side of a FIFO (out_empty, out_data,
// out_rd_en). Channel numbers in the hit words are CH_BASE + i. The status
// outputs are the OR over the channels of the per-channel event pulses.
// CNT_W may be reduced from 16 to shorten frames in simulation; hit words keep
// the 16-bit coarse field.
// Splitting the TDC blocks and front merger into one FPGA follows the
// document; sizes not given there (FIFO depths) are this design's choice.
module str_tdc_group
  import str_tdc_pkg::*;
#(
  parameter int unsigned     N_CH          = 32,
  parameter int unsigned     TAPS          = 192,
  parameter int unsigned     CNT_W         = HB_W,
  parameter logic [CH_W-1:0] CH_BASE       = '0,
  parameter int unsigned     CH_FIFO_DEPTH = 32,
  parameter int unsigned     OUT_DEPTH     = 128
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [TAPS-1:0]    taps [N_CH],
  // heartbeat synchronisation from upstream
  input  logic               sync_en,
  input  logic               sync_beat,
  input  logic [FRAME_W-1:0] sync_frame,
  // run control
  input  logic               trig_mode,
  input  logic               trigger,
  input  logic [15:0]        gate_width,
  input  logic               tot_en,
  input  logic [TOT_W-1:0]   tot_min,
  input  logic [TOT_W-1:0]   tot_max,
  // merged stream
  input  logic               out_rd_en,
  output word_t              out_data,
  output logic               out_empty,
  // status
  output logic               beat,
  output logic [FRAME_W-1:0] frame,
  output logic               any_hit_lost,
  output logic               any_edge_dropped,
  output logic               any_tot_rejected,
  output logic               merge_stall,
  output logic               delim_merged,
  output logic               frame_mismatch,
  output logic               trig_accepted
);

  logic [CNT_W-1:0]   hb_count;
  logic [FRAME_W-1:0] beat_frame;
  logic               beat_resync, gate;

  heartbeat_unit #(.CNT_W(CNT_W), .FRAME_W(FRAME_W)) u_hb (
    .clk, .rst, .sync_en, .sync_beat, .sync_frame,
    .hb_count, .frame, .beat, .beat_frame, .beat_resync
  );

  trigger_emulator #(.WIDTH_W(16)) u_trig (
    .clk, .rst, .trig_mode, .trigger, .gate_width, .gate, .trig_accepted
  );

  logic [N_CH-1:0] ch_empty, ch_rd, ch_lost, ch_edrop, ch_rej;
  word_t           ch_data [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    tdc_block #(
      .TAPS(TAPS), .CNT_W(CNT_W), .CH_ID(CH_W'(CH_BASE + i)), .FIFO_DEPTH(CH_FIFO_DEPTH)
    ) u_tdc (
      .clk, .rst, .taps(taps[i]), .hb_count(HB_W'(hb_count)),
      .beat, .beat_frame, .beat_resync, .gate, .tot_en, .tot_min, .tot_max,
      .rd_en(ch_rd[i]), .dout(ch_data[i]), .empty(ch_empty[i]),
      .hit_lost(ch_lost[i]), .edge_dropped(ch_edrop[i]), .tot_rejected(ch_rej[i])
    );
  end

  merger #(.N_IN(N_CH), .OUT_DEPTH(OUT_DEPTH)) u_front (
    .clk, .rst, .in_empty(ch_empty), .in_data(ch_data), .in_rd_en(ch_rd),
    .out_rd_en, .out_data, .out_empty,
    .stall(merge_stall), .delim_merged, .frame_mismatch
  );

  assign any_hit_lost     = |ch_lost;
  assign any_edge_dropped = |ch_edrop;
  assign any_tot_rejected = |ch_rej;

endmodule
