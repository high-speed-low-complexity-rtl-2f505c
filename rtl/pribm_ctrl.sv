// pribm_ctrl: control unit of the pipelined RiBM key-equation solver.
//
// Holds gamma and the step counter k and derives the MC signal:
//   MC     = (delta0 != 0) && (k >= 0)
//   gamma <= MC ? delta0 : gamma
//   k     <= MC ? -k - 1 : k + 1      (-k-1 is the bitwise inverse of k)
// Because the PEs need two cycles per iteration, a 1-bit counter gates
// gamma and delta0 to zero on every odd cycle (two AND gates); MC is then
// zero too. The k loop holds two registers, as the iteration does, so the
// even-cycle k sequence is the RiBM one; the odd-cycle slot of that loop
// only counts and is never used. `busy` (from the KES sequencer) keeps all
// outputs at zero outside the 4t iteration cycles; `load` sets gamma = 1 and
// k = 0 and resets the 1-bit counter. k is 6 bits, signed (own choice).
module pribm_ctrl
  import rs_pkg::*;
(
  input  logic clk,
  input  logic load,
  input  logic busy,
  input  gf_t  delta0_in,
  output gf_t  gamma,
  output gf_t  delta0,
  output logic mc
);

  gf_t               gamma_q;
  logic signed [5:0] k_a_q, k_b_q;   // two-register k loop; k(r) = k_b_q
  logic              phase_q;        // 1-bit counter: 1 on iteration cycles
  logic              en;

  assign en     = busy && phase_q;
  assign delta0 = en ? delta0_in : gf_t'(0);
  assign gamma  = en ? gamma_q   : gf_t'(0);
  assign mc     = (delta0 != 0) && !k_b_q[5];

  always_ff @(posedge clk) begin
    if (load) begin
      gamma_q <= 8'h01;
      k_a_q   <= '0;
      k_b_q   <= '0;
      phase_q <= 1'b1;
    end else begin
      phase_q <= ~phase_q;
      if (mc) gamma_q <= delta0;
      k_b_q <= k_a_q;
      k_a_q <= mc ? ~k_b_q : k_b_q + 6'sd1;
    end
  end

endmodule
