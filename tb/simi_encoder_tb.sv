// simi_encoder_tb: streams lines of every kind through the encoder, one per
// clock with random gaps, and checks each frame, its bit count and its id one
// clock after the input against the reference encoder. It counts which unit won
// (raw, zero line, 2/4/8/16-byte coding) and fails if any outcome never occurred.
module simi_encoder_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  localparam int ID_W = 26;

  logic clk = 0, rst_n = 0;
  logic valid_i = 0, valid_o;
  logic [ID_W-1:0] id_i = '0, id_o;
  line_t line_i = '0;
  frame_t frame_o;
  size_t bits_o;

  int checks = 0, failures = 0;
  int won [-1:NUM_CAND-1];

  simi_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, pushed when a line is driven; the input is sampled at the
  // next edge and the registered output is seen by this checker one edge later
  frame_t exp_f [$];
  int exp_b [$];
  logic [ID_W-1:0] exp_id [$];
  int exp_cyc [$];

  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      checks++;
      if (exp_f.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        automatic frame_t f = exp_f.pop_front();
        automatic int b = exp_b.pop_front();
        automatic logic [ID_W-1:0] id = exp_id.pop_front();
        automatic int c = exp_cyc.pop_front();
        if (frame_o !== f || int'(bits_o) != b || id_o !== id || int'($time) != c + 20) begin
          failures++;
          $display("FAIL id=%0d coded %b/%b zline %b/%b bits %0d/%0d lat %0d", id, frame_o.coded,
                   f.coded, frame_o.zline, f.zline, bits_o, b, (int'($time) - c) / 10 - 1);
        end
      end
    end
  end

  initial begin
    frame_t f; int b, ch;
    for (int u = -1; u < NUM_CAND; u++) won[u] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      automatic line_t l = gen_line(n % 5, (n / 5) % 4, (n / 20) % 10);
      ref_encode(l, f, b, ch);
      won[ch]++;
      valid_i <= 1; line_i <= l; id_i <= ID_W'(n);
      exp_f.push_back(f); exp_b.push_back(b); exp_id.push_back(ID_W'(n)); exp_cyc.push_back(int'($time));
      @(posedge clk);
      if (n % 7 == 3) begin valid_i <= 0; @(posedge clk); end
    end
    valid_i <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_f.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_f.size()); end
    for (int u = -1; u < NUM_CAND; u++) begin
      checks++;
      if (won[u] == 0) begin failures++; $display("FAIL outcome %0d never happened", u); end
    end
    $display("outcomes raw=%0d zero=%0d g2=%0d g4=%0d g8=%0d g16=%0d", won[-1], won[0], won[1],
             won[2], won[3], won[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
