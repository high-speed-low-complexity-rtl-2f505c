// tb_error_correction: drives error_correction with a 255-point stream of
// random sigma(x), x*sigma'(x), omega(x) values (sigma(x) forced to zero at
// about one point in eight) and random received symbols, and checks that
// each output leaves 5 cycles after its point with
//   corr = rx ^ (sigma(x) == 0 ? x^16 * omega(x) / (x*sigma'(x)) : 0),
// x = alpha^(s+1), plus out_valid/out_sop/err.
module tb_error_correction;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, eval_valid, eval_sop, out_valid, out_sop, err;
  logic [7:0] sig_x, xsigd_x, om_x, rx_data, corr;
  int checks = 0, failures = 0, nerr = 0, nvalid = 0;

  error_correction u_dut (.clk(clk), .rst_n(rst_n), .eval_valid(eval_valid), .eval_sop(eval_sop),
                          .sig_x(sig_x), .xsigd_x(xsigd_x), .om_x(om_x), .rx_data(rx_data),
                          .out_valid(out_valid), .out_sop(out_sop), .corr(corr), .err(err));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] in_s [2*255], in_d [2*255], in_o [2*255], rx [2*255];

  initial begin
    rst_n = 0; eval_valid = 0; eval_sop = 0; sig_x = 0; xsigd_x = 0; om_x = 0; rx_data = 0;
    for (int p = 0; p < 2 * 255; p++) begin
      in_s[p] = ($urandom_range(7) == 0) ? 8'h00 : 8'($urandom);
      in_d[p] = 8'($urandom);
      in_o[p] = 8'($urandom);
      rx[p]   = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // two words back to back; output of point p at input cycle p + 5
    for (int c = 0; c < 2 * 255 + 8; c++) begin
      if (c < 2 * 255) begin
        eval_valid = 1; eval_sop = (c % 255 == 0);
        sig_x = in_s[c]; xsigd_x = in_d[c]; om_x = in_o[c];
      end else begin
        eval_valid = 0; eval_sop = 0; sig_x = 8'($urandom); xsigd_x = 8'($urandom); om_x = 8'($urandom);
      end
      rx_data = (c >= 5 && c - 5 < 2 * 255) ? rx[c-5] : 8'($urandom);
      #1;
      if (c >= 5 && c - 5 < 2 * 255) begin
        int p, s;
        logic [7:0] x, y, e;
        p = c - 5; s = p % 255;
        x = alpha(s + 1);
        y = mul(mul(alpha(16 * (s + 1)), in_o[p]), inv(in_d[p]));
        e = (in_s[p] == 0) ? rx[p] ^ y : rx[p];
        checks += 4;
        if (!out_valid) failures++;
        if (out_sop != (s == 0)) failures++;
        if (err != (in_s[p] == 0)) failures++;
        if (corr !== e) begin
          failures++;
          if (failures < 10) $display("p%0d corr %h exp %h", p, corr, e);
        end
        if (in_s[p] == 0) nerr++;
      end else if (c >= 5) begin
        checks++;
        if (out_valid) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (nerr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
