// merger: merges N FIFOs of framed data into one FIFO, frame by frame.
//
// Every input FIFO carries words of one source (a TDC channel, or a lower
// merger) with a heartbeat delimiter word at the end of each frame. The path
// switcher looks at the flags and the head word of all inputs every cycle:
//   * an input whose head is a delimiter is paused: nothing more is read from
//     it, so words of the next frame cannot overtake the current one;
//   * among the other non-empty inputs the lowest-numbered one ("younger"
//     channel) is read first, one word per cycle;
//   * when the heads of all inputs are delimiters, all of them are popped
//     together and one delimiter is rebuilt and written in their place.
// The rebuilt delimiter carries input 0's frame number and the OR of all
// input flags; FLAG_MISMATCH is set if the inputs disagreed on the frame
// number. Output is a FIFO (OUT_DEPTH words) whose read side is the block's
// output, so mergers cascade (front merger per FPGA, back merger after them).
// When that FIFO is full nothing is read (stall pulses). delim_merged pulses
// when a rebuilt delimiter is written, frame_mismatch when it had a mismatch.
//
// Timing: reading an input and writing the output happen in the same cycle;
// a merged word appears on out_data one cycle later. Sustained rate is one
// 64-bit word per clock (8 Gbps at 125 MHz). The path-switching and delimiter
// rules are the document's; the flag handling and FIFO depth are this
// design's own choice.
module merger
  import str_tdc_pkg::*;
#(
  parameter int unsigned N_IN      = 32,
  parameter int unsigned OUT_DEPTH = 128
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_IN-1:0] in_empty,
  input  word_t           in_data [N_IN],
  output logic [N_IN-1:0] in_rd_en,
  input  logic            out_rd_en,
  output word_t           out_data,
  output logic            out_empty,
  output logic            stall,
  output logic            delim_merged,
  output logic            frame_mismatch
);

  logic [N_IN-1:0] head_delim, head_data;
  logic            all_delim, any_data, ofull, wr;
  word_t           wdata;
  delim_word_t     d0, di;
  logic [3:0]      flags;
  logic            mis;

  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      head_delim[i] = !in_empty[i] && is_delim(in_data[i]);
      head_data[i]  = !in_empty[i] && !is_delim(in_data[i]);
    end
    all_delim = &head_delim;
    any_data  = |head_data;

    // rebuilt delimiter
    d0             = delim_word_t'(in_data[0]);
    flags          = '0;
    mis            = 1'b0;
    for (int i = 0; i < N_IN; i++) begin
      di    = delim_word_t'(in_data[i]);
      flags = flags | di.flags;
      if (di.frame != d0.frame) mis = 1'b1;
    end
    flags[FLAG_MISMATCH] = flags[FLAG_MISMATCH] | mis;

    in_rd_en     = '0;
    wr           = 1'b0;
    wdata        = in_data[0];
    delim_merged = 1'b0;
    if (!ofull) begin
      if (all_delim) begin
        in_rd_en     = '1;
        wr           = 1'b1;
        wdata        = make_delim(d0.frame, flags);
        delim_merged = 1'b1;
      end else begin
        // fixed priority: lowest-numbered input with data
        for (int i = N_IN - 1; i >= 0; i--) begin
          if (head_data[i]) begin
            in_rd_en = '0;
            in_rd_en[i] = 1'b1;
            wdata = in_data[i];
          end
        end
        wr = any_data;
      end
    end
    frame_mismatch = delim_merged && mis;
    stall = ofull && (any_data || all_delim);
  end

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .wr_en(wr), .din(wdata), .full(ofull),
    .rd_en(out_rd_en), .dout(out_data), .empty(out_empty), .count()
  );

endmodule
