// str_lrtdc: streaming low-resolution TDC with 1 ns precision, all in one FPGA.
//
// Each input is sampled 8 times per 8 ns system clock period (tap 0 newest),
// which gives 1 ns bins; the same TDC blocks as in the high-resolution TDC
// turn these samples into paired leading/trailing-edge hits. A single
// str_tdc_group holds the heartbeat unit, the channels, the trigger emulator
// and the merger; its output is the stream sent to the TCP/IP link. The
// heartbeat unit follows the upstream clock distribution when sync_en is set.
//
// Interface: samples[c] is channel c's 8-bit sample word of the current
// clock; the output is a valid/ready stream of 64-bit words. The 1 ns
// precision and the single-FPGA arrangement follow the document; the channel
// count (32) and the sampling as 8 samples per clock are this design's choice.
module str_lrtdc
  import str_tdc_pkg::*;
#(
  parameter int unsigned N_CH          = 32,
  parameter int unsigned SAMPLES       = 8,
  parameter int unsigned CNT_W         = HB_W,
  parameter int unsigned CH_FIFO_DEPTH = 32,
  parameter int unsigned OUT_DEPTH     = 256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SAMPLES-1:0] samples [N_CH],
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
  output logic               frame_done,
  output logic               trig_accepted
);

  logic empty;

  str_tdc_group #(
    .N_CH(N_CH), .TAPS(SAMPLES), .CNT_W(CNT_W), .CH_BASE('0),
    .CH_FIFO_DEPTH(CH_FIFO_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_tdc (
    .clk, .rst, .taps(samples), .sync_en, .sync_beat, .sync_frame,
    .trig_mode, .trigger, .gate_width, .tot_en, .tot_min, .tot_max,
    .out_rd_en(out_valid && out_ready), .out_data, .out_empty(empty),
    .beat(), .frame(), .any_hit_lost(hit_lost), .any_edge_dropped(edge_dropped),
    .any_tot_rejected(tot_rejected), .merge_stall, .delim_merged(frame_done),
    .frame_mismatch(), .trig_accepted
  );

  assign out_valid = !empty;

endmodule
