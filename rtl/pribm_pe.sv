// pribm_pe: processing element of the pipelined RiBM key-equation solver.
//
// Computes delta_i <= gamma * delta_(i+1) + delta0 * theta_i with two
// pipelined multipliers (cut line 2) and a GF adder (XOR) in front of the
// delta register, so the recursion loop holds two registers: a result is
// written two cycles after its operands. The control unit feeds zero gamma
// and delta0 on every other cycle, which makes the delta register carry the
// valid values on even cycles and zeros in between (delta(2r+1) = 0).
// theta_i is a plain register loaded with delta_(i+1) when MC is high and
// held otherwise. `load` initialises both registers (delta_i(0), theta_i(0));
// while loading, the control feeds zeros so the multiplier pipelines are
// emptied at the same time. The load port is this implementation's addition.
module pribm_pe
  import rs_pkg::*;
(
  input  logic clk,
  input  logic load,
  input  gf_t  init_delta,
  input  gf_t  init_theta,
  input  gf_t  delta_next,
  input  gf_t  gamma,
  input  gf_t  delta0,
  input  logic mc,
  output gf_t  delta
);

  gf_t theta_q;
  gf_t p_gamma, p_theta;

  gf_mul_pipe #(.CUT(2)) u_mul_g (.clk(clk), .a(delta_next), .b(gamma),  .z(p_gamma));
  gf_mul_pipe #(.CUT(2)) u_mul_t (.clk(clk), .a(theta_q),    .b(delta0), .z(p_theta));

  always_ff @(posedge clk) begin
    if (load) begin
      delta   <= init_delta;
      theta_q <= init_theta;
    end else begin
      delta   <= p_gamma ^ p_theta;
      theta_q <= mc ? delta_next : theta_q;
    end
  end

endmodule
