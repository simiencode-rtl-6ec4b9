// selector: picks the smallest successful coding of a line, or the raw line.
//
// cands_i holds the results of the encoder units (index 0 the zero encoder, then
// the 2, 4, 8 and 16-byte units). Among those with ok set, the one with the
// fewest body bits wins; on a tie the lower index wins, which prefers the zero
// line and then the smaller granularity (the tie rule is this design's choice).
// When no unit succeeded the raw line is passed with the coded flag cleared and
// bits_o = 512. Purely combinational.
module selector
  import simi_pkg::*;
(
  input  line_t  line_i,
  input  cand_t  cands_i [NUM_CAND],
  output frame_t frame_o,
  output size_t  bits_o
);

  always_comb begin
    frame_o.coded = 1'b0;
    frame_o.zline = 1'b0;
    frame_o.body  = line_i;
    bits_o        = size_t'(LINE_BITS);
    for (int c = 0; c < NUM_CAND; c++) begin
      if (cands_i[c].ok && cands_i[c].size < bits_o) begin
        frame_o.coded = 1'b1;
        frame_o.zline = cands_i[c].zline;
        frame_o.body  = cands_i[c].body;
        bits_o        = cands_i[c].size;
      end
    end
  end

endmodule
