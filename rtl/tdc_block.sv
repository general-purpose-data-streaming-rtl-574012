// tdc_block: one streaming TDC channel, from sampled input to channel FIFO.
//
// Pipeline (one register stage each):
//   tdc_edge_encoder  taps of one clock period -> leading/trailing edge times
//   le_te_pairing     leading + trailing edge  -> one hit with TOT
//   tot_filter        optional TOT window cut
//   event gate        in trigger emulation mode only hits inside the gate pass
//   stream builder    turns hits into 64-bit hit words, inserts a heartbeat
//                     delimiter word at each heartbeat, writes the channel FIFO
// The heartbeat is delayed by the three pipeline stages so that an edge
// captured in the last cycle of a frame is written before that frame's
// delimiter. A hit is placed in the frame in which its trailing edge was seen,
// which for a hit that spans a heartbeat is the next one; its coarse count
// still shows the leading-edge time.
//
// The stream builder keeps a short in-order queue (QDEPTH words) in front of
// the FIFO, because a hit and a delimiter can arrive in the same cycle and the
// FIFO takes one word per cycle. A hit is dropped when the FIFO is full or the
// queue has no room; the drop is counted in the overflow flag of the delimiter
// that closes the frame. Delimiters are never dropped: the mergers downstream
// rely on every channel delivering one per frame.
//
// Interface: the read side of the channel FIFO (first-word fall-through) is the
// block's output. beat/beat_frame/beat_resync come from the heartbeat unit;
// gate from the trigger emulator. hit_lost pulses for each hit lost to a full
// buffer, edge_dropped for each unpaired edge, tot_rejected for each TOT cut.
// Channel structure and the delimiter-per-heartbeat stream follow the document;
// the word layout, queue, drop policy and FIFO depth are this design's choice.
module tdc_block
  import str_tdc_pkg::*;
#(
  parameter int unsigned     TAPS       = 192,
  parameter int unsigned     CNT_W      = HB_W,
  parameter logic [CH_W-1:0] CH_ID      = '0,
  parameter int unsigned     FIFO_DEPTH = 32,
  parameter int unsigned     QDEPTH     = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [TAPS-1:0]    taps,
  input  logic [HB_W-1:0]    hb_count,
  input  logic               beat,
  input  logic [FRAME_W-1:0] beat_frame,
  input  logic               beat_resync,
  input  logic               gate,
  input  logic               tot_en,
  input  logic [TOT_W-1:0]   tot_min,
  input  logic [TOT_W-1:0]   tot_max,
  input  logic               rd_en,
  output word_t              dout,
  output logic               empty,
  output logic               hit_lost,
  output logic               edge_dropped,
  output logic               tot_rejected
);

  localparam int unsigned PIPE = 3;  // encoder + pairing + filter

  // ---------------- hit path ----------------
  logic    le_v, te_v, pr_v, fl_v;
  tstamp_t le_t, te_t, pr_t, fl_t;
  logic [TOT_W-1:0] pr_tot, fl_tot;
  logic    pr_drop, fl_rej;
  assign edge_dropped = pr_drop;
  assign tot_rejected = fl_rej;

  tdc_edge_encoder #(.TAPS(TAPS)) u_enc (
    .clk, .rst, .taps, .coarse(hb_count),
    .le_valid(le_v), .le_time(le_t), .te_valid(te_v), .te_time(te_t)
  );

  le_te_pairing #(.TAPS(TAPS), .CNT_W(CNT_W)) u_pair (
    .clk, .rst, .le_valid(le_v), .le_time(le_t), .te_valid(te_v), .te_time(te_t),
    .hit_valid(pr_v), .hit_time(pr_t), .hit_tot(pr_tot), .dropped(pr_drop)
  );

  tot_filter u_tot (
    .clk, .rst, .enable(tot_en), .tot_min, .tot_max,
    .in_valid(pr_v), .in_time(pr_t), .in_tot(pr_tot),
    .out_valid(fl_v), .out_time(fl_t), .out_tot(fl_tot), .rejected(fl_rej)
  );

  // ---------------- heartbeat delayed to match the hit path ----------------
  logic [PIPE-1:0]   bt_d;
  logic [FRAME_W-1:0] bf_d [PIPE];
  logic [PIPE-1:0]   br_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      bt_d <= '0;
      br_d <= '0;
      for (int i = 0; i < PIPE; i++) bf_d[i] <= '0;
    end else begin
      bt_d <= {bt_d[PIPE-2:0], beat};
      br_d <= {br_d[PIPE-2:0], beat_resync};
      bf_d[0] <= beat_frame;
      for (int i = 1; i < PIPE; i++) bf_d[i] <= bf_d[i-1];
    end
  end

  logic               d_v;
  logic [FRAME_W-1:0] d_frame;
  logic               d_resync;
  assign d_v      = bt_d[PIPE-1];
  assign d_frame  = bf_d[PIPE-1];
  assign d_resync = br_d[PIPE-1];

  // ---------------- stream builder ----------------
  logic      h_v;
  hit_word_t h_w;
  assign h_v = fl_v && gate;
  always_comb begin
    h_w        = '0;
    h_w.kind   = KIND_HIT;
    h_w.ch     = CH_ID;
    h_w.tot    = fl_tot;
    h_w.coarse = fl_t.coarse;
    h_w.fine   = fl_t.fine;
  end

  localparam int unsigned QW = $clog2(QDEPTH + 1);
  localparam int unsigned IW = $clog2(QDEPTH);

  word_t          q [QDEPTH];
  logic [QW-1:0]  qn;
  logic           ovf;        // a hit was lost in the current frame
  logic           fifo_full, fifo_wr;

  word_t          q_nx [QDEPTH];
  logic [QW-1:0]  qn_nx;
  logic           h_take, lost_nx, ovf_nx;
  logic [3:0]     flags;

  assign fifo_wr = (qn != '0) && !fifo_full;

  always_comb begin
    q_nx  = q;
    flags = '0;
    qn_nx = qn;
    // pop the head into the FIFO
    if (fifo_wr) begin
      for (int i = 0; i < QDEPTH - 1; i++) q_nx[i] = q[i+1];
      qn_nx = qn - 1'b1;
    end
    // new hit, if there is room for it and for a delimiter of this cycle
    h_take  = h_v && !fifo_full && (32'(qn_nx) + 32'(d_v) < QDEPTH);
    lost_nx = h_v && !h_take;
    if (h_take) begin
      q_nx[IW'(qn_nx)] = word_t'(h_w);
      qn_nx       = qn_nx + 1'b1;
    end
    ovf_nx = ovf || lost_nx;
    if (d_v) begin
      flags                = '0;
      flags[FLAG_OVERFLOW] = ovf_nx;
      flags[FLAG_RESYNC]   = d_resync;
      q_nx[IW'(qn_nx)]     = make_delim(d_frame, flags);
      qn_nx       = qn_nx + 1'b1;
      ovf_nx      = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      qn       <= '0;
      ovf      <= 1'b0;
      hit_lost <= 1'b0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      q        <= q_nx;
      qn       <= qn_nx;
      ovf      <= ovf_nx;
      hit_lost <= lost_nx;
    end
  end

  assert property (@(posedge clk) disable iff (rst) d_v |-> (32'(qn) - 32'(fifo_wr) < QDEPTH))
    else $error("tdc_block: no room for a heartbeat delimiter");

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(fifo_wr), .din(q[0]), .full(fifo_full),
    .rd_en, .dout, .empty, .count()
  );

endmodule
