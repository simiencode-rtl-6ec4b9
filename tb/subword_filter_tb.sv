// subword_filter_tb: drives lines with random patterns of zero 2-byte sub-words
// and checks the tag bits, the count and the packed payload against a model that
// fills the payload one non-zero sub-word at a time.
module subword_filter_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  int checks = 0, failures = 0;
  line_t x, payload, exp_pay;
  logic [NUM_SUB-1:0] tags, exp_tags;
  logic [CNT_W-1:0] nnz;
  int exp_n;

  subword_filter dut (.xored_i(x), .tags_o(tags), .payload_o(payload), .nnz_o(nnz));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      x = rand_line();
      // zero out sub-words with a probability that varies across the run
      for (int s = 0; s < NUM_SUB; s++)
        if (rnd(16) < (n % 17)) x[s*16 +: 16] = '0;
      if (n == 1) x = '0;
      exp_pay = '0; exp_n = 0;
      for (int s = 0; s < NUM_SUB; s++) begin
        exp_tags[s] = (x[s*16 +: 16] != 0);
        if (exp_tags[s]) begin
          exp_pay[exp_n*16 +: 16] = x[s*16 +: 16];
          exp_n++;
        end
      end
      #1;
      checks += 3;
      if (tags !== exp_tags) begin failures++; $display("FAIL tags %h exp %h", tags, exp_tags); end
      if (int'(nnz) != exp_n) begin failures++; $display("FAIL nnz %0d exp %0d", nnz, exp_n); end
      if (payload !== exp_pay) begin failures++; $display("FAIL payload n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
