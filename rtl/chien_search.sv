// chien_search: pipelined Chien search for sigma(x) of degree <= T.
//
// Cells C1..C8 evaluate sigma_i x^i at x = alpha^(s+1), s = 0..254, one
// point per cycle (point s belongs to received symbol R_(254-s)). Two XOR
// trees sum the odd and the even terms; each sum is registered. The odd sum
// is x*sigma'(x) (in characteristic 2 only odd powers survive the
// derivative), and odd + even + sigma_0 is sigma(x).
// Timing, with `start` at cycle c0 (sigma stable from c0 to c0+2): eval_sop
// is high at c0+3, and eval_valid is high for the 255 cycles c0+3..c0+257,
// during which sig_x / xsigd_x belong to point s = cycle - (c0+3).
// sigma_0 is captured at c0+2 so that the next word's KES result may arrive
// while this word is still being searched (own choice). A new start may
// come 255 cycles after the previous one.
module chien_search
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  sigma [T+1],
  output logic eval_valid,
  output logic eval_sop,
  output gf_t  sig_x,
  output gf_t  xsigd_x
);

  logic [2:0] st_q;                 // start delayed by 1, 2, 3 cycles
  logic [7:0] win_q;                // remaining points of the window
  gf_t        term [1:T];
  gf_t        odd_sum, even_sum, odd_q, even_q, sig0_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q  <= '0;
      win_q <= '0;
    end else begin
      st_q <= {st_q[1:0], start};
      if (st_q[1])          win_q <= 8'(N);
      else if (win_q != 0)  win_q <= win_q - 8'd1;
    end
  end

  assign eval_sop   = st_q[2];
  assign eval_valid = (win_q != 0);

  for (genvar i = 1; i <= T; i++) begin : g_cell
    chien_cell #(.I(i)) u_cell (
      .clk (clk),
      .sel1(start),
      .sel2(st_q[0] | st_q[1]),
      .coef(sigma[i]),
      .term(term[i])
    );
  end

  always_comb begin
    odd_sum  = '0;
    even_sum = '0;
    for (int i = 1; i <= T; i++)
      if (i % 2 == 1) odd_sum ^= term[i];
      else            even_sum ^= term[i];
  end

  always_ff @(posedge clk) begin
    odd_q  <= odd_sum;
    even_q <= even_sum;
    if (st_q[1]) sig0_q <= sigma[0];
  end

  assign xsigd_x = odd_q;
  assign sig_x   = odd_q ^ even_q ^ sig0_q;

endmodule
