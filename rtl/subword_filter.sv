// subword_filter: tags the 2-byte sub-words of a coded line and drops the zero ones.
//
// The line (already XORed with the mask word) is split into NUM_SUB sub-words,
// sub-word 0 in the low bits. Each gets a tag bit: 0 for an all-zero sub-word,
// which is filtered out, 1 otherwise. The non-zero sub-words are packed into
// payload_o from bit 0 upward in ascending sub-word order, so the position of
// sub-word i in the payload is the number of set tags below i; unused payload
// bits are 0. nnz_o counts the non-zero sub-words. Purely combinational.
module subword_filter
  import simi_pkg::*;
(
  input  line_t              xored_i,
  output logic [NUM_SUB-1:0] tags_o,
  output line_t              payload_o,
  output logic [CNT_W-1:0]   nnz_o
);

  logic [NUM_SUB-1:0] tags;
  int unsigned        pos;

  always_comb begin
    payload_o = '0;
    pos       = 0;
    for (int i = 0; i < NUM_SUB; i++) begin
      tags[i] = |xored_i[i*SUB_BITS +: SUB_BITS];
      if (tags[i]) begin
        payload_o[pos*SUB_BITS +: SUB_BITS] = xored_i[i*SUB_BITS +: SUB_BITS];
        pos = pos + 1;
      end
    end
    tags_o = tags;
    nnz_o  = CNT_W'(pos);
  end

endmodule
