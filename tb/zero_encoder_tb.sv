// zero_encoder_tb: lines made of one repeated word at each granularity, lines
// with a single differing sub-word, all-zero lines and random lines, checked
// against the reference zero-line test (smallest matching granularity wins).
module zero_encoder_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  int checks = 0, failures = 0;
  int hit [NUM_GRAN];
  line_t line;
  cand_t cand;

  zero_encoder dut (.line_i(line), .cand_o(cand));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cand_t r;
    for (int g = 0; g < NUM_GRAN; g++) hit[g] = 0;
    for (int n = 0; n < 400; n++) begin
      case (n % 4)
        0, 1: line = gen_line(1, (n / 4) % 4, 0);
        2:    line = gen_line(2, (n / 4) % 4, 1);
        default: line = (n % 8 == 3) ? '0 : rand_line();
      endcase
      #1;
      r = ref_zero(line);
      checks++;
      if (cand.ok !== r.ok || (r.ok && (int'(cand.size) != r.size || cand.body !== r.body ||
          cand.zline !== 1'b1))) begin
        failures++;
        $display("FAIL n=%0d ok %b/%b size %0d/%0d", n, cand.ok, r.ok, cand.size, r.size);
      end
      if (r.ok) hit[int'(r.body[1:0])]++;
    end
    for (int g = 0; g < NUM_GRAN; g++) begin
      checks++;
      if (hit[g] == 0) begin failures++; $display("FAIL no zero line at g=%0d", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
