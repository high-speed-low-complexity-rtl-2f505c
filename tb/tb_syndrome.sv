// tb_syndrome: streams random received words (some of them codewords, some
// back to back, some separated by idle cycles) through syndrome_block and
// compares S0..S15 with Horner evaluation at alpha^i. Also checks that
// syn_valid comes exactly one cycle after the last symbol and that a valid
// codeword gives all-zero syndromes.
module tb_syndrome;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_sop, syn_valid;
  logic [7:0] in_data;
  logic [7:0] syn [16];
  int checks = 0, failures = 0;

  syndrome_block u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sop(in_sop),
                        .in_data(in_data), .syn_valid(syn_valid), .syn(syn));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected syndromes per word, in order
  logic [15:0][7:0] exp_q [$];
  int         last_sym_cycle [$];
  int         cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // checker
  always @(negedge clk) if (rst_n && syn_valid) begin
    logic [15:0][7:0] e;
    int lc;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected syn_valid");
    end else begin
      e = exp_q.pop_front();
      lc = last_sym_cycle.pop_front();
      checks++;
      if (cycle != lc + 1) begin failures++; $display("syn_valid at %0d, last symbol %0d", cycle, lc); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (syn[i] !== e[i]) begin
          failures++;
          if (failures < 10) $display("S%0d = %h exp %h", i, syn[i], e[i]);
        end
      end
    end
  end

  initial begin
    cw_t w;
    logic [7:0] msg [239];
    logic [15:0][7:0] e;
    rst_n = 0; in_valid = 0; in_sop = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      for (int j = 0; j < 239; j++) msg[j] = 8'($urandom);
      w = encode(msg);
      if (n % 2 == 1) for (int j = 0; j < 255; j++) w[j] = 8'($urandom);   // random word
      if (n == 2) w[0] ^= 8'h01;                                          // single error at R0
      if (n == 4) w[254] ^= 8'h80;                                        // single error at R254
      for (int i = 0; i < 16; i++) e[i] = syndrome(w, i);
      if (n == 0) for (int i = 0; i < 16; i++) begin checks++; if (e[i] != 0) failures++; end
      exp_q.push_back(e);
      for (int j = 254; j >= 0; j--) begin
        in_valid = 1; in_sop = (j == 254); in_data = w[j];
        if (j == 0) last_sym_cycle.push_back(cycle);
        @(negedge clk);
      end
      in_valid = 0; in_sop = 0; in_data = 8'($urandom);
      if (n % 3 == 2) repeat (n) @(negedge clk);     // gaps between some words
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing syndromes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
