// mask_word_gen: bitwise-majority mask word of K words of L bits.
//
// For every bit position j the ones among the K words are counted (the "summary"
// word U), and mask bit j is set when that count is strictly greater than K/2, so
// a tie gives 0. The result is the word with the smallest total Hamming distance to
// the K words; XORing each word with it yields as many zero bits as possible.
// Word 1 is taken from the least significant L bits of words_i (word order is this
// design's choice). Purely combinational, no clock.
module mask_word_gen #(
  parameter int K = 16,   // words per line (16 four-byte words of a 64-byte line)
  parameter int L = 32    // bits per word
) (
  input  logic [K*L-1:0] words_i,
  output logic [L-1:0]   mask_o
);

  localparam int CW = $clog2(K + 1);

  logic [CW-1:0] ones [L];

  always_comb begin
    for (int j = 0; j < L; j++) begin
      ones[j] = '0;
      for (int i = 0; i < K; i++)
        ones[j] = ones[j] + CW'(words_i[i*L + j]);
      mask_o[j] = (ones[j] > CW'(K / 2));
    end
  end

endmodule
