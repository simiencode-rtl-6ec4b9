// selector_tb: random sets of five candidate codings (random success flags and
// sizes, frequent ties) checked against a smallest-size, lowest-index-on-tie
// model; with no candidate successful the raw line must come out uncoded.
module selector_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  int checks = 0, failures = 0;
  int raw_seen = 0, tie_seen = 0;
  line_t line;
  cand_t cands [NUM_CAND];
  frame_t frame;
  size_t bits;

  selector dut (.line_i(line), .cands_i(cands), .frame_o(frame), .bits_o(bits));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bsize;
    for (int n = 0; n < 1000; n++) begin
      line = rand_line();
      for (int c = 0; c < NUM_CAND; c++) begin
        cands[c].ok    = rnd(3) != 0 && (n % 7 != 0);
        cands[c].zline = (c == 0);
        cands[c].size  = size_t'(rnd(2) != 0 ? 100 + rnd(4) * 50 : rnd(512));
        cands[c].body  = rand_line();
      end
      best = -1; bsize = LINE_BITS;
      for (int c = 0; c < NUM_CAND; c++)
        if (cands[c].ok) begin
          if (int'(cands[c].size) < bsize) begin best = c; bsize = int'(cands[c].size); end
        end
      for (int c = 0; c < NUM_CAND; c++)
        if (c != best && best >= 0 && cands[c].ok && int'(cands[c].size) == bsize) tie_seen++;
      #1;
      checks++;
      if (best < 0) begin
        raw_seen++;
        if (frame.coded !== 1'b0 || frame.body !== line || int'(bits) != LINE_BITS) begin
          failures++; $display("FAIL raw n=%0d", n);
        end
      end else if (frame.coded !== 1'b1 || frame.zline !== cands[best].zline ||
                   frame.body !== cands[best].body || int'(bits) != bsize) begin
        failures++; $display("FAIL n=%0d best=%0d size %0d/%0d", n, best, bits, bsize);
      end
    end
    checks++;
    if (raw_seen == 0 || tie_seen == 0) begin
      failures++; $display("FAIL coverage raw=%0d tie=%0d", raw_seen, tie_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
