// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the per-channel buffer behind each TDC block and as the output
// buffer of each merger. The word at the head is always visible on dout while
// empty is low, so a reader checks the flags and the head word in the same
// cycle and pops it with rd_en; a word written in one cycle is readable in the
// next. One write and one read per cycle are allowed together, giving one word
// per clock in and out. Writing while full or reading while empty is a usage
// error and is flagged by assertions (the write or read is ignored).
// DEPTH must be a power of two. The storage is a plain array, so it maps to
// distributed or block RAM. The FIFO itself is named by the document; its form
// and depth are this design's own choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       din,
  output logic                   full,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_wr, do_rd;

  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty = (wp == rp);
  assign count = wp - rp;
  assign dout  = mem[rp[AW-1:0]];
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two");

  assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("sync_fifo: write while full");
  assert property (@(posedge clk) disable iff (rst) !(rd_en && empty))
    else $error("sync_fifo: read while empty");

endmodule
