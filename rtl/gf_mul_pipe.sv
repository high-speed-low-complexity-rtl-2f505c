// gf_mul_pipe: pipelined GF(2^8) multiplier, z = a * b mod p(x), with one
// register stage (latency 1 cycle, one new product per cycle).
//
// Structure: the rows A*alpha^k (k = 0..7) are formed from XORs of the bits of
// A; each row is ANDed with bit b_k of B, giving 8 partial products per output
// bit, which an XOR tree of depth 3 sums. The single pipeline register sits
// at one of two cut lines:
//   CUT = 1 : after the AND plane (64 partial-product bits are registered);
//             used by the folded KES (PF-RiBM),
//   CUT = 2 : after the first XOR level of the tree (32 bits registered);
//             used by the pipelined KES (pRiBM) and the other blocks.
// Both placements follow the decoder's design. The pipeline register has no
// reset: a product is valid one cycle after its operands.
module gf_mul_pipe
  import rs_pkg::*;
#(
  parameter int unsigned CUT = 2
) (
  input  logic clk,
  input  gf_t  a,
  input  gf_t  b,
  output gf_t  z
);

  gf_t row [M];            // row[k] = A * alpha^k
  gf_t pp  [M];            // pp[k]  = row[k] & {8{b[k]}}

  always_comb begin
    row[0] = a;
    for (int k = 1; k < M; k++) row[k] = gf_xtime(row[k-1]);
    for (int k = 0; k < M; k++) pp[k] = row[k] & {M{b[k]}};
  end

  if (CUT == 1) begin : g_cut1
    gf_t pp_q [M];
    always_ff @(posedge clk) pp_q <= pp;
    always_comb begin
      z = '0;
      for (int k = 0; k < M; k++) z ^= pp_q[k];
    end
  end else begin : g_cut2
    gf_t l1_q [M/2];
    gf_t lvl1 [M/2];
    always_comb
      for (int k = 0; k < M/2; k++) lvl1[k] = pp[2*k] ^ pp[2*k+1];
    always_ff @(posedge clk) l1_q <= lvl1;
    always_comb begin
      z = '0;
      for (int k = 0; k < M/2; k++) z ^= l1_q[k];
    end
  end

endmodule
