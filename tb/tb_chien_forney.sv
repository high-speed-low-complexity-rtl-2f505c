// tb_chien_forney: drives chien_search and forney_eval with random sigma
// (degree 8) and omega (degree 7) polynomials, two evaluations back to back
// (the second start 255 cycles after the first, with the polynomials
// changed right after each start), and compares sigma(x), x*sigma'(x) and
// omega(x) at x = alpha^1 .. alpha^255 with direct evaluation. Also checks
// that eval_sop comes 3 cycles after start and that eval_valid lasts 255
// cycles per start.
module tb_chien_forney;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, eval_valid, eval_sop;
  logic [7:0] sigma [9];
  logic [7:0] omega [8];
  logic [7:0] sig_x, xsigd_x, om_x;
  int checks = 0, failures = 0;

  chien_search u_chien (.clk(clk), .rst_n(rst_n), .start(start), .sigma(sigma),
                        .eval_valid(eval_valid), .eval_sop(eval_sop),
                        .sig_x(sig_x), .xsigd_x(xsigd_x));
  forney_eval u_forney (.clk(clk), .rst_n(rst_n), .start(start), .omega(omega), .om_x(om_x));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ps [2][9];
  logic [7:0] po [2][8];
  int cycle = 0, start_cycle [2];
  int valid_cycles = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // checker: point s of word w at cycle start_cycle[w] + 3 + s
  always @(negedge clk) if (rst_n) begin
    if (eval_valid) valid_cycles++;
    for (int w = 0; w < 2; w++) begin
      int s;
      s = cycle - start_cycle[w] - 3;
      if (start_cycle[w] >= 0 && s >= 0 && s < 255) begin
        logic [7:0] x, es, ed, eo, xp;
        x = alpha(s + 1);
        es = 0; ed = 0; eo = 0; xp = 1;
        for (int i = 0; i < 9; i++) begin
          es ^= mul(ps[w][i], xp);
          if (i % 2 == 1) ed ^= mul(ps[w][i], xp);
          if (i < 8) eo ^= mul(po[w][i], xp);
          xp = mul(xp, x);
        end
        checks += 5;
        if (!eval_valid) failures++;
        if (eval_sop != (s == 0)) failures++;
        if (sig_x !== es || xsigd_x !== ed || om_x !== eo) begin
          failures++;
          if (failures < 10) $display("w%0d s%0d: %h %h %h exp %h %h %h", w, s, sig_x, xsigd_x, om_x, es, ed, eo);
        end
      end
    end
  end

  initial begin
    start_cycle[0] = -1000; start_cycle[1] = -1000;
    rst_n = 0; start = 0;
    foreach (sigma[i]) sigma[i] = 0;
    foreach (omega[i]) omega[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int w = 0; w < 2; w++) begin
      for (int i = 0; i < 9; i++) begin ps[w][i] = 8'($urandom); sigma[i] = ps[w][i]; end
      for (int i = 0; i < 8; i++) begin po[w][i] = 8'($urandom); omega[i] = po[w][i]; end
      if (w == 1) begin sigma[3] = 0; ps[w][3] = 0; end
      start = 1;
      start_cycle[w] = cycle;
      @(negedge clk);
      start = 0;
      repeat (2) @(negedge clk);
      // the polynomials may change from here on
      foreach (sigma[i]) sigma[i] = 8'($urandom);
      foreach (omega[i]) omega[i] = 8'($urandom);
      repeat (252) @(negedge clk);
    end
    repeat (270) @(negedge clk);
    checks++;
    if (valid_cycles != 510) begin failures++; $display("eval_valid for %0d cycles", valid_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
