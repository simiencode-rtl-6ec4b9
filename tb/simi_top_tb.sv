// simi_top_tb: end-to-end test of the encoder/decoder front end at its default
// size. A behavioural memory (an associative array of frames indexed by line
// address) sits between the write and read ports. Phase 1 writes lines of every
// kind; phase 2 reads each address back while new lines are written in the same
// cycles (overwriting addresses already read) and phase 3 reads those back. Each
// frame and bit count is compared with the reference encoder, each returned line
// with the line written, and both latencies must be one clock. The test counts
// every outcome of the encoding (raw fallback, zero line, coding at 2/4/8/16
// bytes, zero sub-words filtered, more than one unit succeeding, reads and writes
// in the same cycle) and fails if any never happened. It reports the bits written
// against an uncoded memory.
module simi_top_tb;
  import simi_pkg::*;
  import simi_ref_pkg::*;

  localparam int ADDR_W = 26;
  localparam int NLINES = 400;

  logic clk = 0, rst_n = 0;
  logic              wr_valid_i = 0;
  logic [ADDR_W-1:0] wr_addr_i = '0;
  line_t             wr_line_i = '0;
  logic              nvm_wr_valid_o;
  logic [ADDR_W-1:0] nvm_wr_addr_o;
  frame_t            nvm_wr_frame_o;
  size_t             nvm_wr_bits_o;
  logic              nvm_rd_valid_i = 0;
  logic [ADDR_W-1:0] nvm_rd_addr_i = '0;
  frame_t            nvm_rd_frame_i = '0;
  logic              rd_valid_o;
  logic [ADDR_W-1:0] rd_addr_o;
  line_t             rd_line_o;

  simi_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint bits_coded = 0, bits_raw = 0;

  // mechanism counters
  int n_raw = 0, n_zero = 0, n_filter = 0, n_multi = 0, n_both = 0;
  int n_gran [NUM_GRAN];

  // behavioural memory and golden copy of the lines
  frame_t nvm [logic [ADDR_W-1:0]];
  line_t  gold [logic [ADDR_W-1:0]];

  // expected encoder outputs and read-back results, in order
  frame_t            ew_f [$];
  int                ew_b [$];
  logic [ADDR_W-1:0] ew_a [$];
  int                ew_t [$];
  line_t             er_l [$];
  logic [ADDR_W-1:0] er_a [$];
  int                er_t [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory side: store every encoded frame, check it on the way
  always @(posedge clk) begin
    if (rst_n && nvm_wr_valid_o) begin
      checks++;
      if (ew_f.size() == 0) begin
        failures++; $display("FAIL unexpected write");
      end else begin
        automatic frame_t            f = ew_f.pop_front();
        automatic int                b = ew_b.pop_front();
        automatic logic [ADDR_W-1:0] a = ew_a.pop_front();
        automatic int                t = ew_t.pop_front();
        if (nvm_wr_frame_o !== f || int'(nvm_wr_bits_o) != b || nvm_wr_addr_o !== a ||
            int'($time) != t + 20) begin
          failures++; $display("FAIL write addr %0d bits %0d/%0d", a, nvm_wr_bits_o, b);
        end
        bits_coded += longint'(nvm_wr_bits_o) + 2;
        bits_raw += longint'(LINE_BITS);
      end
      nvm[nvm_wr_addr_o] = nvm_wr_frame_o;
    end
    if (rst_n && rd_valid_o) begin
      checks++;
      if (er_l.size() == 0) begin
        failures++; $display("FAIL unexpected read data");
      end else begin
        automatic line_t             l = er_l.pop_front();
        automatic logic [ADDR_W-1:0] a = er_a.pop_front();
        automatic int                t = er_t.pop_front();
        if (rd_line_o !== l || rd_addr_o !== a || int'($time) != t + 20) begin
          failures++; $display("FAIL read addr %0d", a);
        end
      end
    end
  end

  task automatic drive_write(logic [ADDR_W-1:0] a, line_t l);
    frame_t f; int b, ch, nok;
    ref_cand_t c;
    ref_encode(l, f, b, ch);
    nok = ref_zero(l).ok ? 1 : 0;
    for (int g = 0; g < NUM_GRAN; g++) begin
      c = ref_gran(l, g);
      nok += c.ok ? 1 : 0;
    end
    if (nok > 1) n_multi++;
    if (!f.coded) n_raw++;
    else if (f.zline) n_zero++;
    else begin
      n_gran[int'(f.body[1:0])]++;
      if (b < 2 + gbits(int'(f.body[1:0])) + NUM_SUB + 16 * NUM_SUB) n_filter++;
    end
    wr_valid_i <= 1; wr_addr_i <= a; wr_line_i <= l;
    ew_f.push_back(f); ew_b.push_back(b); ew_a.push_back(a); ew_t.push_back(int'($time));
    gold[a] = l;
  endtask

  task automatic drive_read(logic [ADDR_W-1:0] a);
    nvm_rd_valid_i <= 1; nvm_rd_addr_i <= a; nvm_rd_frame_i <= nvm[a];
    er_l.push_back(gold[a]); er_a.push_back(a); er_t.push_back(int'($time));
  endtask

  function automatic logic [ADDR_W-1:0] addr_of(int n);
    return ADDR_W'(n * 4099 + 7);   // spread over the address space
  endfunction

  initial begin
    for (int g = 0; g < NUM_GRAN; g++) n_gran[g] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // phase 1: fill
    for (int n = 0; n < NLINES; n++) begin
      drive_write(addr_of(n), gen_line(n % 5, (n / 5) % 4, (n / 20) % 10));
      @(posedge clk);
    end
    wr_valid_i <= 0;
    repeat (3) @(posedge clk);
    // phase 2: read everything back, overwrite the first half of the lines meanwhile
    for (int n = 0; n < NLINES; n++) begin
      drive_read(addr_of(n));
      if (n < NLINES / 2) begin
        drive_write(addr_of(n), gen_line((n + 2) % 5, (n / 3) % 4, n % 11));
        n_both++;
      end else begin
        wr_valid_i <= 0;
      end
      @(posedge clk);
    end
    nvm_rd_valid_i <= 0; wr_valid_i <= 0;
    repeat (3) @(posedge clk);
    // phase 3: read the overwritten lines
    for (int n = 0; n < NLINES / 2; n++) begin
      drive_read(addr_of(n));
      @(posedge clk);
    end
    nvm_rd_valid_i <= 0;
    repeat (3) @(posedge clk);

    checks++;
    if (ew_f.size() != 0 || er_l.size() != 0) begin
      failures++; $display("FAIL outstanding writes %0d reads %0d", ew_f.size(), er_l.size());
    end
    $display("raw=%0d zero_line=%0d g2=%0d g4=%0d g8=%0d g16=%0d subword_filtered=%0d multi_unit=%0d rd_wr_same_cycle=%0d",
             n_raw, n_zero, n_gran[0], n_gran[1], n_gran[2], n_gran[3], n_filter, n_multi, n_both);
    $display("bits written %0d of %0d uncoded (%0d%%)", bits_coded, bits_raw,
             int'(bits_coded * 100 / bits_raw));
    checks += 9;
    if (n_raw == 0)    begin failures++; $display("FAIL raw fallback never happened"); end
    if (n_zero == 0)   begin failures++; $display("FAIL zero line never happened"); end
    for (int g = 0; g < NUM_GRAN; g++)
      if (n_gran[g] == 0) begin failures++; $display("FAIL granularity %0d never chosen", g); end
    if (n_filter == 0) begin failures++; $display("FAIL no zero sub-word filtered"); end
    if (n_multi == 0)  begin failures++; $display("FAIL selector never had a choice"); end
    if (n_both == 0)   begin failures++; $display("FAIL no simultaneous read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
