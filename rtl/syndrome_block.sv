// syndrome_block: 2t = 16 parallel pipelined syndrome cells S0..S15.
//
// Symbols of a word arrive one per cycle, R254 first, flagged by in_sop on
// the first one; the 255 symbols of a word must be consecutive. A symbol
// counter drives signal1 of the cells (high for the first two symbols of a
// word) and raises syn_valid for one cycle, the cycle after R0 arrived, when
// syn[i] = R(alpha^i). Words may follow each other back to back: the cycle
// that presents the syndromes of one word may already carry R254 of the
// next. The counter and the valid pulse are this implementation's choice.
module syndrome_block
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sop,
  input  gf_t  in_data,
  output logic syn_valid,
  output gf_t  syn [2*T]
);

  logic [7:0] cnt_q;        // index of the current symbol within the word
  logic       first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      syn_valid <= 1'b0;
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        if (in_sop) cnt_q <= 8'd1;
        else        cnt_q <= cnt_q + 8'd1;
        if (!in_sop && cnt_q == 8'(N - 1)) syn_valid <= 1'b1;
      end
    end
  end

  assign first = in_sop || (cnt_q == 8'd1);

  for (genvar i = 0; i < 2 * T; i++) begin : g_cell
    syndrome_cell #(.I(i)) u_cell (
      .clk  (clk),
      .first(first),
      .r_in (in_data),
      .s_out(syn[i])
    );
  end

endmodule
