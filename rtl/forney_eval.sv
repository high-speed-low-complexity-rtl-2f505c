// forney_eval: pipelined evaluation of the error-evaluator polynomial
// omega(x) (degree < T) at the same points as the Chien search.
//
// Cells C1..C7 produce omega_i x^i at x = alpha^(s+1); omega_0 joins the
// first XOR tree; both halves of the tree are registered and then added.
// With `start` at cycle c0, om_x for point s appears at cycle c0+3+s, in
// step with chien_search. omega_0 is captured at c0+1 so the next word's
// KES result may arrive while this word is still evaluated (own choice).
module forney_eval
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  omega [T],
  output gf_t  om_x
);

  logic [1:0] st_q;
  gf_t        term [1:T-1];
  gf_t        lo_sum, hi_sum, lo_q, hi_q, om0_q;

  always_ff @(posedge clk) begin
    if (!rst_n) st_q <= '0;
    else        st_q <= {st_q[0], start};
  end

  for (genvar i = 1; i < T; i++) begin : g_cell
    chien_cell #(.I(i)) u_cell (
      .clk (clk),
      .sel1(start),
      .sel2(st_q[0] | st_q[1]),
      .coef(omega[i]),
      .term(term[i])
    );
  end

  always_comb begin
    lo_sum = om0_q;
    hi_sum = '0;
    for (int i = 1; i < T; i++)
      if (i < T / 2) lo_sum ^= term[i];
      else           hi_sum ^= term[i];
  end

  always_ff @(posedge clk) begin
    lo_q <= lo_sum;
    hi_q <= hi_sum;
    if (st_q[0]) om0_q <= omega[0];
  end

  assign om_x = lo_q ^ hi_q;

endmodule
