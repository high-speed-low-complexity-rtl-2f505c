// tb_pfribm_kes: feeds syndromes of received words with 0..8 random symbol
// errors into the PF-RiBM (folded) key-equation solver and checks
//  - the done pulse comes exactly 2t*14+1 = 225 cycles after start,
//  - sigma/omega equal a software RiBM run on the same syndromes,
//  - sigma(alpha^-j) = 0 at every error position j (independent check).
module tb_pfribm_kes;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, done;
  logic [7:0] syn [16];
  logic [7:0] sigma [9];
  logic [7:0] omega [8];
  int checks = 0, failures = 0;

  pfribm_kes u_dut (.clk(clk), .rst_n(rst_n), .start(start), .syn(syn),
                   .done(done), .sigma(sigma), .omega(omega));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t w;
    logic [7:0] msg [239];
    logic [7:0] es [9];
    logic [7:0] eo [8];
    logic [7:0] s_dyn [];
    int pos [$];
    int nerr, lat;
    rst_n = 0; start = 0;
    for (int i = 0; i < 16; i++) syn[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      for (int j = 0; j < 239; j++) msg[j] = 8'($urandom);
      w = encode(msg);
      nerr = n % 9;
      pos.delete();
      while (pos.size() < nerr) begin
        int p;
        bit dup;
        p = $urandom_range(254);
        dup = 0;
        foreach (pos[q]) if (pos[q] == p) dup = 1;
        if (!dup) pos.push_back(p);
      end
      foreach (pos[q]) w[pos[q]] ^= 8'($urandom_range(255, 1));
      for (int i = 0; i < 16; i++) syn[i] = syndrome(w, i);
      ribm(syn, es, eo);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < 16; i++) syn[i] = 8'($urandom);   // syndromes only needed at start
      lat = 1;
      while (!done && lat < 400) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 225) begin failures++; $display("latency %0d", lat); end
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (sigma[i] !== es[i]) begin failures++; $display("w%0d sigma%0d %h exp %h", n, i, sigma[i], es[i]); end
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (omega[i] !== eo[i]) begin failures++; $display("w%0d omega%0d %h exp %h", n, i, omega[i], eo[i]); end
      end
      s_dyn = new[9];
      for (int i = 0; i < 9; i++) s_dyn[i] = sigma[i];
      foreach (pos[q]) begin
        checks++;
        if (peval(s_dyn, alpha(-pos[q])) != 0) begin failures++; $display("w%0d no root at %0d", n, pos[q]); end
      end
      repeat (n % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
