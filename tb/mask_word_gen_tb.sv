// mask_word_gen_tb: checks the bitwise-majority mask word at the default size
// (16 words of 32 bits) and at 32 words of 16 bits against a counting model,
// including exact ties (half the words set gives 0) and one-over-half cases.
module mask_word_gen_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  int checks = 0, failures = 0;
  line_t words;
  logic [31:0] mask32;
  logic [15:0] mask16;

  mask_word_gen dut (.words_i(words), .mask_o(mask32));
  mask_word_gen #(.K(32), .L(16)) dut16 (.words_i(words), .mask_o(mask16));

  task automatic check(string what);
    line_t e4 = ref_mask(words, 1);
    line_t e2 = ref_mask(words, 0);
    checks += 2;
    if (mask32 !== e4[31:0]) begin
      failures++; $display("FAIL %s K16: got %h exp %h", what, mask32, e4[31:0]);
    end
    if (mask16 !== e2[15:0]) begin
      failures++; $display("FAIL %s K32: got %h exp %h", what, mask16, e2[15:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every bit position: exactly 8 of 16 words set -> tie -> 0
    words = '0;
    for (int i = 0; i < 8; i++) words[i*32 +: 32] = '1;
    #1 check("tie");
    if (mask32 !== 32'h0) begin failures++; $display("FAIL tie not zero"); end
    checks++;
    // 9 of 16 set -> 1
    words[8*32 +: 32] = '1;
    #1 check("9of16");
    if (mask32 !== 32'hffff_ffff) begin failures++; $display("FAIL 9of16"); end
    checks++;
    for (int n = 0; n < 400; n++) begin
      words = gen_line(n % 5, (n / 5) % 4, n % 9);
      #1 check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
