// str_tdc_top: the two streaming TDC firmwares of the base board, side by side.
//
// The same base board runs either the 64-channel high-resolution TDC
// (str_hrtdc, tapped delay lines on two mezzanine cards) or the 1 ns
// low-resolution TDC (str_lrtdc, everything in the base FPGA). They share no
// logic at run time, so this top simply holds both, each with its own clock,
// reset, inputs and output stream (hr_* and lr_* ports). Both produce the same
// stream format: 64-bit hit words (channel, leading-edge time, TOT) and one
// heartbeat delimiter per 2^16-cycle frame carrying the 24-bit frame number.
// The clock and heartbeat distribution link, the TCP/IP engine and the
// off-chip buffers connect at the ports: sync_* come from the clock
// distribution, *_out_* go to the network link.
module str_tdc_top
  import str_tdc_pkg::*;
#(
  parameter int unsigned HR_TAPS = 192,
  parameter int unsigned HR_CH   = 64,
  parameter int unsigned LR_CH   = 32,
  parameter int unsigned CNT_W   = HB_W
) (
  // ---- high-resolution TDC ----
  input  logic               hr_clk,
  input  logic               hr_rst,
  input  logic [HR_TAPS-1:0] hr_taps [HR_CH],
  input  logic               hr_sync_en,
  input  logic               hr_sync_beat,
  input  logic [FRAME_W-1:0] hr_sync_frame,
  input  logic               hr_trig_mode,
  input  logic               hr_trigger,
  input  logic [15:0]        hr_gate_width,
  input  logic               hr_tot_en,
  input  logic [TOT_W-1:0]   hr_tot_min,
  input  logic [TOT_W-1:0]   hr_tot_max,
  output logic               hr_out_valid,
  output word_t              hr_out_data,
  input  logic               hr_out_ready,
  output logic [6:0]         hr_status,   // {trig, frame_done, mismatch, stall, tot_rej, edge_drop, lost}
  // ---- low-resolution TDC ----
  input  logic               lr_clk,
  input  logic               lr_rst,
  input  logic [7:0]         lr_samples [LR_CH],
  input  logic               lr_sync_en,
  input  logic               lr_sync_beat,
  input  logic [FRAME_W-1:0] lr_sync_frame,
  input  logic               lr_trig_mode,
  input  logic               lr_trigger,
  input  logic [15:0]        lr_gate_width,
  input  logic               lr_tot_en,
  input  logic [TOT_W-1:0]   lr_tot_min,
  input  logic [TOT_W-1:0]   lr_tot_max,
  output logic               lr_out_valid,
  output word_t              lr_out_data,
  input  logic               lr_out_ready,
  output logic [5:0]         lr_status    // {trig, frame_done, stall, tot_rej, edge_drop, lost}
);

  str_hrtdc #(
    .N_MEZZ(2), .CH_PER_MEZZ(HR_CH / 2), .TAPS(HR_TAPS), .CNT_W(CNT_W)
  ) u_hr (
    .clk(hr_clk), .rst(hr_rst), .taps(hr_taps),
    .sync_en(hr_sync_en), .sync_beat(hr_sync_beat), .sync_frame(hr_sync_frame),
    .trig_mode(hr_trig_mode), .trigger(hr_trigger), .gate_width(hr_gate_width),
    .tot_en(hr_tot_en), .tot_min(hr_tot_min), .tot_max(hr_tot_max),
    .out_valid(hr_out_valid), .out_data(hr_out_data), .out_ready(hr_out_ready),
    .hit_lost(hr_status[0]), .edge_dropped(hr_status[1]), .tot_rejected(hr_status[2]),
    .merge_stall(hr_status[3]), .frame_mismatch(hr_status[4]), .frame_done(hr_status[5]),
    .trig_accepted(hr_status[6])
  );

  str_lrtdc #(
    .N_CH(LR_CH), .SAMPLES(8), .CNT_W(CNT_W)
  ) u_lr (
    .clk(lr_clk), .rst(lr_rst), .samples(lr_samples),
    .sync_en(lr_sync_en), .sync_beat(lr_sync_beat), .sync_frame(lr_sync_frame),
    .trig_mode(lr_trig_mode), .trigger(lr_trigger), .gate_width(lr_gate_width),
    .tot_en(lr_tot_en), .tot_min(lr_tot_min), .tot_max(lr_tot_max),
    .out_valid(lr_out_valid), .out_data(lr_out_data), .out_ready(lr_out_ready),
    .hit_lost(lr_status[0]), .edge_dropped(lr_status[1]), .tot_rejected(lr_status[2]),
    .merge_stall(lr_status[3]), .frame_done(lr_status[4]), .trig_accepted(lr_status[5])
  );

endmodule
