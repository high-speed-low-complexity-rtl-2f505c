// pfribm_pe: folded processing element of the PF-RiBM key-equation solver.
//
// One PE holds FOLD = 13 consecutive coefficients delta_(13i+k) and
// theta_(13i+k) and processes one of them per cycle with two pipelined
// multipliers (cut line 1) and one GF adder:
//   delta_k <= gamma * delta_(k+1) + delta0 * theta_k
//   theta_k <= MC ? delta_(k+1) : theta_k
// An iteration takes FOLD + 1 = 14 cycles (cyc = 0..13): coefficient k is
// read at cyc = k and its new value leaves the adder at cyc = k+1.
//
// Register arrangement (names as in the decoder's PE drawing):
//  * delta chain chain[1..11] ("delta_13i+1 .. delta_13i+11"): shifts one
//    place towards chain[1] at the end of cycles 1..13; the adder feeds
//    chain[11]; the value leaving chain[1] goes to `spare`.
//  * `hold` ("delta_13i"): takes `spare` at the end of cycle 13 only, so it
//    keeps this PE's old delta_0 through the iteration for the preceding PE.
//  * theta ring theta_q[0..12] plus bridge2_q: rotates every cycle; at cycle
//    k theta_k is in theta_q[0] and its update enters bridge2_q.
//  * The multipliers' pipeline registers play the roles of the drawing's
//    "delta_13i+12" (gamma product) and "Bridge1" (delta0 product).
// Between iterations: hold = delta_0, spare = delta_1, chain[j] = delta_(j+1).
// The gamma operand delta_(k+1) is `spare` at cycle 0, chain[1] at cycles
// 1..11 and the next PE's `hold` at cycle 12. gamma, delta0 and MC are held
// constant by the control unit for a whole iteration. The shift schedule is
// worked out here from the register names and the end-of-iteration state the
// decoder's description gives; the drawing's LC-controlled multiplexers are
// replaced by the cycle decodes of this schedule.
module pfribm_pe
  import rs_pkg::*;
#(
  parameter int unsigned FOLD = 13
) (
  input  logic       clk,
  input  logic       load,
  input  gf_t        init   [FOLD],   // delta_k(0) = theta_k(0)
  input  logic       issue,           // cycles 0..FOLD-1 of an iteration
  input  logic       write,           // cycles 1..FOLD of an iteration
  input  logic [3:0] cyc,             // modulo-(FOLD+1) cycle count
  input  gf_t        next_d0,         // next PE's hold register
  input  gf_t        gamma,
  input  gf_t        delta0,
  input  logic       mc,
  output gf_t        hold,            // old delta_0 of this PE
  output gf_t        delta  [FOLD]    // coefficients between iterations
);

  gf_t  chain   [1:FOLD-2];
  gf_t  theta_q [FOLD];
  gf_t  bridge2_q;
  gf_t  spare;                         // value leaving the chain
  gf_t  d_next, p_g, p_t;

  always_comb begin
    if (cyc == 4'd0)               d_next = spare;
    else if (cyc == 4'(FOLD - 1))  d_next = next_d0;
    else                           d_next = chain[1];
  end

  gf_mul_pipe #(.CUT(1)) u_mul_g (.clk(clk), .a(d_next),     .b(gamma),  .z(p_g));
  gf_mul_pipe #(.CUT(1)) u_mul_t (.clk(clk), .a(theta_q[0]), .b(delta0), .z(p_t));

  always_ff @(posedge clk) begin
    if (load) begin
      hold  <= init[0];
      spare <= init[1];
      for (int j = 1; j <= FOLD - 2; j++) chain[j] <= init[j+1];
      for (int j = 0; j < FOLD; j++) theta_q[j] <= init[j];
      bridge2_q <= '0;
    end else if (issue || write) begin
      // theta ring rotates on every cycle of an iteration
      bridge2_q          <= (mc && cyc < 4'(FOLD)) ? d_next : theta_q[0];
      theta_q[FOLD-1]    <= bridge2_q;
      for (int j = 0; j < FOLD - 1; j++) theta_q[j] <= theta_q[j+1];
      if (write) begin
        spare <= chain[1];
        for (int j = 1; j < FOLD - 2; j++) chain[j] <= chain[j+1];
        chain[FOLD-2] <= p_g ^ p_t;
        if (cyc == 4'(FOLD)) hold <= spare;
      end
    end
  end

  always_comb begin
    delta[0] = hold;
    delta[1] = spare;
    for (int j = 2; j < FOLD; j++) delta[j] = chain[j-1];
  end

endmodule
