// syndrome_cell: modified pipelined syndrome cell computing
//   S_I = R(alpha^I) = sum_j R_j alpha^(I*j)
// for one word streamed highest coefficient first (R254, R253, ..., R0), one
// symbol per cycle.
//
// The Horner loop contains the register D and the pipeline register of the
// constant multiplier, so it is two cycles long. The cell therefore keeps two
// interleaved accumulators in the same loop: the even-indexed symbols
// (R254, R252, ..., R0) and the odd-indexed ones (R253, ..., R1), each stepped
// by alpha^(2I). On the cycle after R0 has entered, D holds the even sum and
// the second pipelined multiplier (constant alpha^I) holds odd_sum*alpha^I, so
// s_out = even + odd*alpha^I is valid for exactly that cycle:
//   S_I = R_even(alpha^2I) + alpha^I * R_odd(alpha^2I).
// `first` (signal1) replaces the loop value by 0 for the first two symbols of
// a word, which starts both accumulators. This is the decoder's own cell; the
// exact timing of signal1 is this implementation's choice.
module syndrome_cell
  import rs_pkg::*;
#(
  parameter int unsigned I = 0
) (
  input  logic clk,
  input  logic first,
  input  gf_t  r_in,
  output gf_t  s_out
);

  localparam gf_t A_I  = gf_alpha_pow(I);
  localparam gf_t A_2I = gf_alpha_pow(2 * I);

  gf_t d_q;
  gf_t fb;        // alpha^2I * D, one cycle late
  gf_t odd_sc;    // alpha^I  * D, one cycle late

  gf_mul_pipe #(.CUT(2)) u_mul_2i (.clk(clk), .a(d_q), .b(A_2I), .z(fb));
  gf_mul_pipe #(.CUT(2)) u_mul_i  (.clk(clk), .a(d_q), .b(A_I),  .z(odd_sc));

  always_ff @(posedge clk)
    d_q <= r_in ^ (first ? gf_t'(0) : fb);

  assign s_out = d_q ^ odd_sc;

endmodule
