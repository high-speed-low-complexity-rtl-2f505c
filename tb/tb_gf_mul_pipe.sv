// tb_gf_mul_pipe: checks both cut-line variants of the pipelined GF(2^8)
// multiplier against log/antilog multiplication, including all products of
// a few fixed operands and random pairs, and the one-cycle latency.
module tb_gf_mul_pipe;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] a, b, z1, z2;
  int checks = 0, failures = 0;

  gf_mul_pipe #(.CUT(1)) u1 (.clk(clk), .a(a), .b(b), .z(z1));
  gf_mul_pipe #(.CUT(2)) u2 (.clk(clk), .a(a), .b(b), .z(z2));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pa, pb, expv;
    a = 0; b = 0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      pa = (n < 256) ? 8'(n) : 8'($urandom);
      pb = (n < 256) ? 8'h87 : ((n < 512) ? 8'(n) : 8'($urandom));
      a = pa; b = pb;
      expv = mul(pa, pb);
      @(negedge clk);                       // one cycle later
      checks += 2;
      if (z1 !== expv || z2 !== expv) begin
        failures++;
        if (failures < 10) $display("mismatch %h*%h: %h %h exp %h", pa, pb, z1, z2, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
