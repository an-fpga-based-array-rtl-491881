// radar_pkg: types and constants shared by the array processor.
//
// Sizes that come from the published design: 16 array slices, 96 range
// blocks (1536 ranges), 6-bit I and Q for the broadcast reference signal x,
// 1-bit I and Q for the scattered signal y, 13-bit complex accumulators
// (26 bits), 15-bit SRAM addresses, 6-bit packed y words and a 27-bit
// output word (26-bit sum plus a frame indication bit). The integration
// length T may be set from 32 to 128 at run time.
//
// Choices of this implementation: x is stored as {I, Q} in two's
// complement; a y component bit of 0 means +1 and 1 means -1; a complex
// sum is packed as {re, im}; the packed y word is {spare[1:0], pre, cur}.
package radar_pkg;

  localparam int unsigned NSLICE    = 16;   // hardware array stages
  localparam int unsigned NBLOCKS   = 96;   // range blocks per frame
  localparam int unsigned XW        = 6;    // bits per x component
  localparam int unsigned ACCW      = 13;   // bits per accumulator component
  localparam int unsigned AW        = 15;   // SRAM address width
  localparam int unsigned YWORDW    = 6;    // packed y word width
  localparam int unsigned TW        = 8;    // width of the T setting
  localparam int unsigned T_MIN     = 32;   // smallest integration length
  localparam int unsigned T_MAX     = 128;  // largest integration length
  localparam int unsigned OUTW      = 2*ACCW + 1;  // 27-bit output word

  // Complex reference sample, 12 bits.
  typedef struct packed {
    logic signed [XW-1:0] i;
    logic signed [XW-1:0] q;
  } xsample_t;

  // Complex 1-bit scattered sample: each bit is a sign (0 = +1, 1 = -1).
  typedef struct packed {
    logic i;
    logic q;
  } ysample_t;

  // Complex accumulator value, 26 bits.
  typedef struct packed {
    logic signed [ACCW-1:0] re;
    logic signed [ACCW-1:0] im;
  } cacc_t;

  // Packed y word as read from the y-data SRAM.
  typedef struct packed {
    logic [1:0] spare;
    ysample_t   pre;   // sample for the pipeline being preloaded
    ysample_t   cur;   // sample for the pipeline of the running block
  } yword_t;

  // Word leaving the array towards the bridge board.
  typedef struct packed {
    logic  frame;      // set on the first word of every frame
    cacc_t z;
  } outword_t;

endpackage
