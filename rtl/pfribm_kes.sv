// pfribm_kes: pipelined and folded RiBM (PF-RiBM) key-equation solver.
//
// The 3t+1 = 25 RiBM coefficients (padded to NPE*FOLD = 26 slots, the last
// always zero) are folded onto NPE = 2 processing elements of FOLD = 13
// coefficients each; one RiBM iteration takes FOLD + 1 = 14 cycles (13
// coefficients plus the multiplier pipeline stage), so the 2t = 16
// iterations finish in 224 cycles. Initial contents: slot g holds S_g for
// g < 16, 1 for g = 3t = 24, else 0, in both the delta and theta registers.
// Results: omega_i = delta_i (i < t), sigma_i = delta_(t+i) (i <= t), read
// straight from the PE registers, which hold them until the next start.
// Timing: `start` (one cycle, syndromes on `syn`) loads the PEs; `done`
// pulses 2t*14 + 1 = 225 cycles later with sigma/omega valid; they stay
// valid until the next start, which may come any time after done.
module pfribm_kes
  import rs_pkg::*;
#(
  parameter int unsigned FOLD = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  syn   [2*T],
  output logic done,
  output gf_t  sigma [T+1],
  output gf_t  omega [T]
);

  localparam int unsigned NPE = (3 * T + 1 + FOLD - 1) / FOLD;

  gf_t        init   [NPE][FOLD];
  gf_t        delta  [NPE][FOLD];
  gf_t        hold   [NPE];
  gf_t        gamma, delta0;
  logic       mc, issue, write;
  logic [3:0] cyc;

  always_comb
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < FOLD; k++)
        init[p][k] = (p * FOLD + k < 2 * T) ? syn[(p * FOLD + k) % (2 * T)] :
                     ((p * FOLD + k == 3 * T) ? gf_t'(1) : gf_t'(0));

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pfribm_pe #(.FOLD(FOLD)) u_pe (
      .clk    (clk),
      .load   (start),
      .init   (init[p]),
      .issue  (issue),
      .write  (write),
      .cyc    (cyc),
      .next_d0(p == NPE - 1 ? gf_t'(0) : hold[(p + 1) % NPE]),
      .gamma  (gamma),
      .delta0 (delta0),
      .mc     (mc),
      .hold   (hold[p]),
      .delta  (delta[p])
    );
  end

  pfribm_ctrl #(.FOLD(FOLD)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .s0    (syn[0]),
    .pe0_tap(delta[0][3]),
    .cyc   (cyc),
    .issue (issue),
    .write (write),
    .gamma (gamma),
    .delta0(delta0),
    .mc    (mc),
    .done  (done)
  );

  always_comb begin
    for (int i = 0; i <= T; i++) sigma[i] = delta[(T + i) / FOLD][(T + i) % FOLD];
    for (int i = 0; i < T; i++)  omega[i] = delta[i / FOLD][i % FOLD];
  end

endmodule
