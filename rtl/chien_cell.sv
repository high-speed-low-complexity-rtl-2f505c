// chien_cell: pipelined Chien search / Forney cell C_I.
//
// Produces term = coef * x^I for the evaluation points x = alpha^1, alpha^2,
// alpha^3, ... one per cycle. The update loop (register D plus the pipeline
// register of the constant multiplier alpha^(2I)) is two cycles long, so two
// interleaved sequences share it: the odd points alpha^1, alpha^3, ... and
// the even points alpha^2, alpha^4, ..., each advanced by alpha^(2I).
// They are started by a pipelined multiplier coef * (sel1 ? alpha^I : alpha^2I)
// that MUX (2) (sel2) passes into D instead of the loop value.
// Timing, with `start` at cycle c0: sel1 = 1 at c0 (0 otherwise), sel2 = 1
// at c0+1 and c0+2; term for evaluation point alpha^(s+1) appears at cycle
// c0+2+s. coef must be stable at c0 and c0+1.
// The initial constants alpha^I / alpha^2I (rather than 1 / alpha^I) make the
// first point alpha^1, i.e. received symbol R254 first; this is this
// implementation's alignment choice.
module chien_cell
  import rs_pkg::*;
#(
  parameter int unsigned I = 1
) (
  input  logic clk,
  input  logic sel1,
  input  logic sel2,
  input  gf_t  coef,
  output gf_t  term
);

  localparam gf_t A_I  = gf_alpha_pow(I);
  localparam gf_t A_2I = gf_alpha_pow(2 * I);

  gf_t init_p, fb;

  gf_mul_pipe #(.CUT(2)) u_mul_init (.clk(clk), .a(coef), .b(sel1 ? A_I : A_2I), .z(init_p));
  gf_mul_pipe #(.CUT(2)) u_mul_loop (.clk(clk), .a(term), .b(A_2I),             .z(fb));

  always_ff @(posedge clk)
    term <= sel2 ? init_p : fb;

endmodule
