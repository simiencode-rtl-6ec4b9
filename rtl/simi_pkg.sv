// simi_pkg: sizes, types and helpers shared by the similarity encoder and decoder.
//
// A 64-byte cache line is coded at one of four granularities (2, 4, 8 or 16-byte
// words); the coded words are always examined as 2-byte sub-words, so every coding
// carries 32 tag bits. A stored line is a frame_t: a coded/raw flag, a zero-line
// flag and a 512-bit body. For a coded line the body holds, from bit 0 upward, the
// 2-bit granularity prefix, the mask word, the 32 tag bits and the non-zero
// sub-words; for a zero line only the prefix and the mask word; for a raw line the
// line itself. The line size, the granularities, the prefix values and the sub-word
// size follow the scheme's definition; the exact body layout is this design's choice.
package simi_pkg;

  localparam int LINE_BYTES = 64;                     // cache line size
  localparam int LINE_BITS  = 8 * LINE_BYTES;
  localparam int SUB_BYTES  = 2;                      // sub-word size
  localparam int SUB_BITS   = 8 * SUB_BYTES;
  localparam int NUM_SUB    = LINE_BITS / SUB_BITS;   // tag bits per coded line
  localparam int NUM_GRAN   = 4;                      // 2, 4, 8, 16 bytes
  localparam int NUM_CAND   = NUM_GRAN + 1;           // + the zero encoder unit
  localparam int PREFIX_W   = 2;
  localparam int SIZE_W     = 10;                     // holds any body size up to 1023 bits
  localparam int CNT_W      = $clog2(NUM_SUB + 1);

  typedef logic [PREFIX_W-1:0]  prefix_t;
  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [SIZE_W-1:0]    size_t;

  // What is written to the memory for one line.
  typedef struct packed {
    logic  coded;   // 0: body is the raw line
    logic  zline;   // 1: coded line is all zero, body holds prefix and mask only
    line_t body;
  } frame_t;

  // Result of one encoder unit.
  typedef struct packed {
    logic  ok;      // the unit coded the line into fewer than LINE_BITS bits
    logic  zline;
    size_t size;    // body bits that carry information
    line_t body;
  } cand_t;

  // Granularity in bytes selected by a prefix: 00->2, 01->4, 10->8, 11->16.
  function automatic int gran_bytes(prefix_t p);
    return SUB_BYTES << p;
  endfunction

endpackage
