// zero_encoder: the zero encoder unit, for lines that code to an all-zero line.
//
// A line XORed with its majority mask word is all zero exactly when all its words
// are equal; the mask word is then that word. The unit compares the words at each
// of the four granularities (2, 4, 8, 16 bytes) and, if any matches, takes the
// smallest one: the body is then only the 2-bit prefix and the mask word (the
// first word of the line), 2 + 8*G bits, and the frame's zero-line flag replaces
// the 32 tag bits. A raw all-zero line is caught at 2 bytes with mask 0. Reading
// the zero encoder unit this way is this design's interpretation of the scheme's
// zero-cache-line coding. Purely combinational.
module zero_encoder
  import simi_pkg::*;
(
  input  line_t line_i,
  output cand_t cand_o
);

  logic [NUM_GRAN-1:0] rep;    // all words equal at granularity 2 << g bytes
  line_t               body [NUM_GRAN];

  for (genvar g = 0; g < NUM_GRAN; g++) begin : g_gran
    localparam int L = SUB_BITS << g;
    assign rep[g]  = (line_i == {(LINE_BITS / L){line_i[L-1:0]}});
    assign body[g] = LINE_BITS'({line_i[L-1:0], prefix_t'(g)});
  end

  always_comb begin
    cand_o = '0;
    cand_o.zline = 1'b1;
    for (int g = NUM_GRAN - 1; g >= 0; g--) begin
      if (rep[g]) begin
        cand_o.ok   = 1'b1;
        cand_o.size = size_t'(PREFIX_W + (SUB_BITS << g));
        cand_o.body = body[g];
      end
    end
  end

endmodule
