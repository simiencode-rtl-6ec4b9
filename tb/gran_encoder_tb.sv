// gran_encoder_tb: one encoder unit per granularity (2, 4, 8, 16 bytes), each
// compared with the bit-serial reference coding: success flag, size and body.
// The line mix covers zero lines, repeated words, near-repeated words, small
// integers and random lines, so both success and failure of each unit occur.
module gran_encoder_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  int checks = 0, failures = 0;
  int ok_seen [NUM_GRAN];
  int fail_seen [NUM_GRAN];
  line_t line;
  cand_t cand [NUM_GRAN];

  for (genvar g = 0; g < NUM_GRAN; g++) begin : g_dut
    gran_encoder #(.GRAN_BYTES(2 << g)) dut (.line_i(line), .cand_o(cand[g]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cand_t r;
    for (int g = 0; g < NUM_GRAN; g++) begin ok_seen[g] = 0; fail_seen[g] = 0; end
    for (int n = 0; n < 500; n++) begin
      line = gen_line(n % 5, (n / 5) % 4, (n / 20) % 12);
      #1;
      for (int g = 0; g < NUM_GRAN; g++) begin
        r = ref_gran(line, g);
        checks++;
        if (cand[g].ok !== r.ok || cand[g].zline !== 1'b0 || int'(cand[g].size) != r.size ||
            (r.ok && cand[g].body !== r.body)) begin
          failures++;
          $display("FAIL g=%0d n=%0d ok %b/%b size %0d/%0d", g, n, cand[g].ok, r.ok,
                   cand[g].size, r.size);
        end
        if (r.ok) ok_seen[g]++; else fail_seen[g]++;
      end
    end
    for (int g = 0; g < NUM_GRAN; g++) begin
      checks++;
      if (ok_seen[g] == 0 || fail_seen[g] == 0) begin
        failures++; $display("FAIL g=%0d coverage ok=%0d fail=%0d", g, ok_seen[g], fail_seen[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
