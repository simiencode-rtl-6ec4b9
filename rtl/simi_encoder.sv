// simi_encoder: the encoding logic, five encoder units and a selector.
//
// The zero encoder unit and four granularity encoder units (2, 4, 8, 16-byte
// words) work on the incoming line in parallel; the selector keeps the smallest
// coding that is shorter than the line, or the raw line. The chosen frame, its
// information size in bits and a side-band id (the line address) are registered,
// so a line presented with valid_i appears on valid_o one clock later; one line
// can be accepted every clock and there is no back-pressure. The five parallel
// units and the smallest-size selection follow the scheme; the single register
// stage, the side-band id and the synchronous active-low reset (which clears only
// valid_o) are this design's choices.
module simi_encoder
  import simi_pkg::*;
#(
  parameter int ID_W = 26
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  logic [ID_W-1:0] id_i,
  input  line_t           line_i,
  output logic            valid_o,
  output logic [ID_W-1:0] id_o,
  output frame_t          frame_o,
  output size_t           bits_o
);

  cand_t  cands [NUM_CAND];
  frame_t frame;
  size_t  bits;

  zero_encoder u_zero (
    .line_i (line_i),
    .cand_o (cands[0])
  );

  for (genvar g = 0; g < NUM_GRAN; g++) begin : g_unit
    gran_encoder #(.GRAN_BYTES(SUB_BYTES << g)) u_enc (
      .line_i (line_i),
      .cand_o (cands[g+1])
    );
  end

  selector u_sel (
    .line_i  (line_i),
    .cands_i (cands),
    .frame_o (frame),
    .bits_o  (bits)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
    end
    if (valid_i) begin
      id_o    <= id_i;
      frame_o <= frame;
      bits_o  <= bits;
    end
  end

  // A coded frame is always shorter than the raw line, and only a coded frame
  // can be a zero line.
  a_coded_shorter: assert property (@(posedge clk) disable iff (!rst_n)
    valid_o |-> (frame_o.coded ? (bits_o < size_t'(LINE_BITS)) :
                                 (bits_o == size_t'(LINE_BITS) && !frame_o.zline)));

endmodule
