// str_tdc_pkg: word formats and constants shared by the streaming TDC.
//
// Every word in the stream is 64 bits wide. At the 125 MHz system clock one
// word per cycle is 8 Gbps, the internal bandwidth of the streaming TDC.
// Two kinds of word travel in the stream:
//   * a hit word: one paired leading/trailing edge, carrying the channel, the
//     leading-edge time (16-bit heartbeat count + fine count) and the
//     time-over-threshold (TOT);
//   * a heartbeat delimiter: closes one heartbeat frame (2^16 clock cycles)
//     and carries the 24-bit frame number.
// The 16-bit heartbeat count and the 24-bit frame number are the document's
// numbers; the bit positions, the kind codes and the flag bits are this
// design's own choice.
package str_tdc_pkg;

  localparam int unsigned WORD_W  = 64;
  localparam int unsigned HB_W    = 16;  // heartbeat counter width
  localparam int unsigned FRAME_W = 24;  // heartbeat frame number width
  localparam int unsigned FINE_W  = 8;   // fine-count field in a hit word
  localparam int unsigned TOT_W   = 16;  // TOT field, in fine-count units
  localparam int unsigned CH_W    = 6;   // channel field (64 channels)

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [3:0] {
    KIND_HIT   = 4'hB,
    KIND_DELIM = 4'hF
  } kind_e;

  // Flag bits of a delimiter word.
  localparam int unsigned FLAG_OVERFLOW = 0;  // hits were lost in this frame
  localparam int unsigned FLAG_MISMATCH = 1;  // merged inputs disagreed on the frame number
  localparam int unsigned FLAG_RESYNC   = 2;  // heartbeat counter was realigned in this frame

  typedef struct packed {
    kind_e                kind;      // [63:60]
    logic [CH_W-1:0]      ch;        // [59:54]
    logic [TOT_W-1:0]     tot;       // [53:38]
    logic [13:0]          rsv;       // [37:24]
    logic [HB_W-1:0]      coarse;    // [23:8]  heartbeat count of the leading edge
    logic [FINE_W-1:0]    fine;      // [7:0]   fine count of the leading edge
  } hit_word_t;

  typedef struct packed {
    kind_e                kind;      // [63:60]
    logic [3:0]           flags;     // [59:56]
    logic [15:0]          rsv0;      // [55:40]
    logic [FRAME_W-1:0]   frame;     // [39:16]
    logic [15:0]          rsv1;      // [15:0]
  } delim_word_t;

  // An edge time: heartbeat count of the capturing clock plus fine count.
  typedef struct packed {
    logic [HB_W-1:0]      coarse;
    logic [FINE_W-1:0]    fine;
  } tstamp_t;

  function automatic word_t make_delim(logic [FRAME_W-1:0] frame, logic [3:0] flags);
    delim_word_t d;
    d       = '0;
    d.kind  = KIND_DELIM;
    d.flags = flags;
    d.frame = frame;
    return word_t'(d);
  endfunction

  function automatic logic is_delim(word_t w);
    return w[63:60] == KIND_DELIM;
  endfunction

endpackage
