// simi_top: similarity-encoding front end between the last-level cache and a
// non-volatile (phase-change) main memory.
//
// Write path: a 64-byte line and its address enter on wr_*; one clock later the
// encoded frame leaves on nvm_wr_* together with nvm_wr_bits_o, the number of body
// bits that carry information (prefix, mask word, tags and non-zero sub-words, or
// the whole line when it is stored raw). Read path: a frame returned by the memory
// on nvm_rd_* is decoded and leaves on rd_* one clock later. Both paths take one
// request per clock without back-pressure. The memory array and its controller
// are outside this module. ADDR_W = 26 addresses the 2^26 lines of a 4 GB memory;
// the address only travels alongside the data. The encode/decode split follows the
// scheme's write and read procedures; the interface and timing are this design's.
module simi_top
  import simi_pkg::*;
#(
  parameter int ADDR_W = 26
) (
  input  logic              clk,
  input  logic              rst_n,
  // write request from the cache
  input  logic              wr_valid_i,
  input  logic [ADDR_W-1:0] wr_addr_i,
  input  line_t             wr_line_i,
  // encoded write to the memory
  output logic              nvm_wr_valid_o,
  output logic [ADDR_W-1:0] nvm_wr_addr_o,
  output frame_t            nvm_wr_frame_o,
  output size_t             nvm_wr_bits_o,
  // stored frame returned by the memory
  input  logic              nvm_rd_valid_i,
  input  logic [ADDR_W-1:0] nvm_rd_addr_i,
  input  frame_t            nvm_rd_frame_i,
  // decoded line to the cache
  output logic              rd_valid_o,
  output logic [ADDR_W-1:0] rd_addr_o,
  output line_t             rd_line_o
);

  simi_encoder #(.ID_W(ADDR_W)) u_encoder (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (wr_valid_i),
    .id_i    (wr_addr_i),
    .line_i  (wr_line_i),
    .valid_o (nvm_wr_valid_o),
    .id_o    (nvm_wr_addr_o),
    .frame_o (nvm_wr_frame_o),
    .bits_o  (nvm_wr_bits_o)
  );

  simi_decoder #(.ID_W(ADDR_W)) u_decoder (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (nvm_rd_valid_i),
    .id_i    (nvm_rd_addr_i),
    .frame_i (nvm_rd_frame_i),
    .valid_o (rd_valid_o),
    .id_o    (rd_addr_o),
    .line_o  (rd_line_o)
  );

endmodule
