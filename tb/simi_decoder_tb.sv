// simi_decoder_tb: feeds frames made by the reference encoder (raw, zero-line
// and coded at every granularity) and checks that the decoder returns the
// original line and id one clock later. A second set of frames with random tag
// and payload bits checks the decoder against the cursor-based reference decoder.
module simi_decoder_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  localparam int ID_W = 26;

  logic clk = 0, rst_n = 0;
  logic valid_i = 0, valid_o;
  logic [ID_W-1:0] id_i = '0, id_o;
  frame_t frame_i = '0;
  line_t line_o;

  int checks = 0, failures = 0;
  int kinds [-1:NUM_CAND-1];

  simi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_t exp_l [$];
  logic [ID_W-1:0] exp_id [$];
  int exp_cyc [$];

  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      checks++;
      if (exp_l.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        automatic line_t l = exp_l.pop_front();
        automatic logic [ID_W-1:0] id = exp_id.pop_front();
        automatic int c = exp_cyc.pop_front();
        if (line_o !== l || id_o !== id || int'($time) != c + 20) begin
          failures++; $display("FAIL id=%0d line mismatch or latency %0d", id, (int'($time) - c) / 10 - 1);
        end
      end
    end
  end

  task automatic send(frame_t f, line_t l, int n);
    valid_i <= 1; frame_i <= f; id_i <= ID_W'(n);
    exp_l.push_back(l); exp_id.push_back(ID_W'(n)); exp_cyc.push_back(int'($time));
    @(posedge clk);
  endtask

  initial begin
    frame_t f; int b, ch;
    for (int u = -1; u < NUM_CAND; u++) kinds[u] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      automatic line_t l = gen_line(n % 5, (n / 5) % 4, (n / 20) % 10);
      ref_encode(l, f, b, ch);
      kinds[ch]++;
      send(f, l, n);
      if (n % 5 == 2) begin valid_i <= 0; @(posedge clk); end
    end
    // arbitrary coded frames: decoder must agree with the reference decoder
    for (int n = 0; n < 300; n++) begin
      f.coded = 1; f.zline = (n % 5 == 0); f.body = rand_line();
      send(f, ref_decode(f), 1000 + n);
    end
    valid_i <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_l.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_l.size()); end
    for (int u = -1; u < NUM_CAND; u++) begin
      checks++;
      if (kinds[u] == 0) begin failures++; $display("FAIL frame kind %0d never sent", u); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
