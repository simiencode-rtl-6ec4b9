// simi_decoder: the decoding logic, from a stored frame back to the cache line.
//
// A raw frame (coded = 0) returns its body. Otherwise the 2-bit prefix in body
// bits [1:0] gives the word size G (2, 4, 8 or 16 bytes) and so where the mask
// word, the 32 tag bits and the payload start. For a zero-line frame the line is
// the mask word repeated. For a coded frame each 2-byte sub-word i is zero when
// its tag bit is 0 and is otherwise taken from the payload at the position given
// by the number of set tags below i (the sequential tag scan done in parallel);
// the rebuilt line is then XORed with the repeated mask word. The result and a
// side-band id are registered: valid_o follows valid_i one clock later, one frame
// per clock. The decoding steps follow the scheme; the register stage, side-band
// id and synchronous active-low reset (clearing valid_o only) are this design's.
module simi_decoder
  import simi_pkg::*;
#(
  parameter int ID_W = 26
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [ID_W-1:0] id_i,
  input  frame_t          frame_i,
  output logic            valid_o,
  output logic [ID_W-1:0] id_o,
  output line_t           line_o
);

  // Fields of the body for each possible granularity.
  line_t              mask_rep [NUM_GRAN];
  logic [NUM_SUB-1:0] tags_g   [NUM_GRAN];
  line_t              pay_g    [NUM_GRAN];

  for (genvar g = 0; g < NUM_GRAN; g++) begin : g_gran
    localparam int L = SUB_BITS << g;
    assign mask_rep[g] = {(LINE_BITS / L){frame_i.body[PREFIX_W +: L]}};
    assign tags_g[g]   = frame_i.body[PREFIX_W + L +: NUM_SUB];
    assign pay_g[g]    = frame_i.body >> (PREFIX_W + L + NUM_SUB);
  end

  prefix_t            prefix;
  logic [NUM_SUB-1:0] tags;
  line_t              payload;
  line_t              coded;
  line_t              line;
  int unsigned        pos;

  always_comb begin
    prefix  = frame_i.body[PREFIX_W-1:0];
    tags    = tags_g[prefix];
    payload = pay_g[prefix];
    coded   = '0;
    pos     = 0;
    for (int i = 0; i < NUM_SUB; i++) begin
      if (tags[i]) begin
        coded[i*SUB_BITS +: SUB_BITS] = payload[pos*SUB_BITS +: SUB_BITS];
        pos = pos + 1;
      end
    end
    if (!frame_i.coded)
      line = frame_i.body;
    else if (frame_i.zline)
      line = mask_rep[prefix];
    else
      line = coded ^ mask_rep[prefix];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
    end
    if (valid_i) begin
      id_o   <= id_i;
      line_o <= line;
    end
  end

endmodule
