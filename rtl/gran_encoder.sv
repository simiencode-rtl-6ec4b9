// gran_encoder: one encoder unit of the similarity encoder, for one word size.
//
// The line is cut into K = LINE_BITS / (8*GRAN_BYTES) words. mask_word_gen forms
// their bitwise-majority mask word; every word is XORed with it; subword_filter
// tags the 2-byte sub-words of the result and keeps only the non-zero ones. The
// coded body is, from bit 0 upward: the 2-bit prefix of this granularity
// (00/01/10/11 for 2/4/8/16 bytes), the mask word, 32 tag bits and the non-zero
// sub-words. Its size is 2 + 8*GRAN_BYTES + 32 + 16*(non-zero sub-words) bits; the
// unit succeeds (cand_o.ok) only when that is below the 512 bits of the raw line.
// The prefix values, the majority rule, the 2-byte sub-words and the size test
// follow the scheme; the bit layout of the body is this design's choice.
// Purely combinational.
module gran_encoder
  import simi_pkg::*;
#(
  parameter int GRAN_BYTES = 4    // 2, 4, 8 or 16
) (
  input  line_t line_i,
  output cand_t cand_o
);

  localparam int      L      = 8 * GRAN_BYTES;
  localparam int      K      = LINE_BITS / L;
  localparam prefix_t PREFIX = prefix_t'($clog2(GRAN_BYTES / SUB_BYTES));
  localparam int      HDR    = PREFIX_W + L + NUM_SUB;

  logic [L-1:0]       mask;
  line_t              xored;
  logic [NUM_SUB-1:0] tags;
  line_t              payload;
  logic [CNT_W-1:0]   nnz;
  size_t              size;

  mask_word_gen #(.K(K), .L(L)) u_mask (
    .words_i (line_i),
    .mask_o  (mask)
  );

  assign xored = line_i ^ {K{mask}};

  subword_filter u_filter (
    .xored_i   (xored),
    .tags_o    (tags),
    .payload_o (payload),
    .nnz_o     (nnz)
  );

  always_comb begin
    size         = size_t'(HDR) + size_t'(nnz) * size_t'(SUB_BITS);
    cand_o.ok    = (size < size_t'(LINE_BITS));
    cand_o.zline = 1'b0;
    cand_o.size  = size;
    // Bits beyond LINE_BITS are only lost when ok is 0.
    cand_o.body  = LINE_BITS'({payload, tags, mask, PREFIX});
  end

endmodule
