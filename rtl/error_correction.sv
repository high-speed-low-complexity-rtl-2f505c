// error_correction: pipelined error value computation and correction.
//
// For the evaluation point x = alpha^(s+1) (received symbol R_(254-s)) the
// error value is
//   Y = x^(2t) * omega(x) / (x * sigma'(x)),
// applied only where sigma(x) = 0. The division uses the registered inverse
// ROM; two pipelined multipliers form omega(x)*inv and then the product with
// x^(2t). The factor x^(2t) = alpha^(2t(s+1)) comes from a loop of the same
// interleaved kind as the Chien cells: it is started with alpha^2t and
// alpha^4t (signal_L_1, signal_L_2) and advanced by alpha^4t every two
// cycles. sigma(x) is registered, tested for zero (NOR) and delayed by four
// registers to line up with Y, which is ANDed with that flag and XORed onto
// the received symbol.
// Timing: inputs sig_x/xsigd_x/om_x belong to point s at cycle e_s (with
// eval_valid, eval_sop on the first point); the corrected symbol leaves at
// e_s + 5 with out_valid/out_sop, and rx_data must present R_(254-s) at that
// same cycle. The structure follows the decoder's design; the register
// counts are chosen to make these paths line up.
module error_correction
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic eval_valid,
  input  logic eval_sop,
  input  gf_t  sig_x,
  input  gf_t  xsigd_x,
  input  gf_t  om_x,
  input  gf_t  rx_data,
  output logic out_valid,
  output logic out_sop,
  output gf_t  corr,
  output logic err
);

  localparam gf_t A_2T = gf_alpha_pow(2 * T);
  localparam gf_t A_4T = gf_alpha_pow(4 * T);

  // zero flag path: D, NOR, four D
  gf_t        sig_q;
  logic [3:0] zero_q;
  logic [4:0] vld_q, sop_q;

  // value path
  gf_t inv_x, om_q, prod1, prod1_q, pw_q, pw_d1, pw_d2, pw_fb, prod2, y_q;
  logic sop_d1;

  always_ff @(posedge clk) begin
    sig_q  <= sig_x;
    zero_q <= {zero_q[2:0], ~|sig_q};
    om_q   <= om_x;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q  <= '0;
      sop_q  <= '0;
      sop_d1 <= 1'b0;
    end else begin
      vld_q  <= {vld_q[3:0], eval_valid};
      sop_q  <= {sop_q[3:0], eval_sop};
      sop_d1 <= eval_sop;
    end
  end

  gf_inv_rom u_rom (.clk(clk), .a(xsigd_x), .inv(inv_x));

  gf_mul_pipe #(.CUT(2)) u_mul_val (.clk(clk), .a(om_q), .b(inv_x), .z(prod1));

  // x^(2t) generator: value for point s in pw_q at e_s + 1
  gf_mul_pipe #(.CUT(2)) u_mul_pw (.clk(clk), .a(pw_q), .b(A_4T), .z(pw_fb));

  always_ff @(posedge clk) begin
    if (eval_sop || sop_d1) pw_q <= eval_sop ? A_2T : A_4T;
    else                    pw_q <= pw_fb;
    pw_d1   <= pw_q;
    pw_d2   <= pw_d1;
    prod1_q <= prod1;
  end

  gf_mul_pipe #(.CUT(2)) u_mul_pw2 (.clk(clk), .a(prod1_q), .b(pw_d2), .z(prod2));

  always_ff @(posedge clk) y_q <= prod2;

  assign err       = vld_q[4] && zero_q[3];
  assign corr      = rx_data ^ (err ? y_q : gf_t'(0));
  assign out_valid = vld_q[4];
  assign out_sop   = sop_q[4];

endmodule
