// rs_decoder: streaming RS(255,239) decoder (t = 8 symbol errors) over
// GF(2^8), p(x) = 1 + x^2 + x^3 + x^4 + x^8, syndromes S_i = R(alpha^i),
// i = 0..15.
//
// Dataflow: syndrome_block -> key-equation solver -> chien_search and
// forney_eval in parallel -> error_correction, with the received symbols
// waiting in delay_fifo until their error values are known. Every feedback
// loop uses pipelined GF multipliers, so the critical path stays around
// three XOR levels.
// The key-equation solver is selected by FOLDED:
//   0: pribm_kes, 25 PEs, 4t = 32 iteration cycles (done 34 cycles after
//      the syndromes), decoder latency 297 cycles;
//   1: pfribm_kes, 2 folded PEs, 14 cycles per iteration (done 225 cycles
//      after the syndromes), decoder latency 488 cycles.
// Interface: one symbol per cycle on in_data with in_valid, R254 first,
// in_sop on R254; the 255 symbols of a word are consecutive and word starts
// are at least 255 cycles apart. Corrected symbols leave in the same order
// with out_valid/out_sop; out_err marks symbols that were changed. The
// valid/sop handshake and the latency figures are this implementation's.
module rs_decoder
  import rs_pkg::*;
#(
  parameter bit FOLDED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sop,
  input  gf_t  in_data,
  output logic out_valid,
  output logic out_sop,
  output gf_t  out_data,
  output logic out_err
);

  // cycles from syn_valid to the KES done pulse, and from the Chien start to
  // the corrected output of the first point
  localparam int unsigned KES_LAT  = FOLDED ? PFRIBM_LAT : PRIBM_LAT;
  localparam int unsigned BACK_LAT = 8;
  localparam int unsigned FIFO_LAT = N + KES_LAT + BACK_LAT;

  logic syn_valid, kes_done, eval_valid, eval_sop;
  gf_t  syn   [2*T];
  gf_t  sigma [T+1];
  gf_t  omega [T];
  gf_t  sig_x, xsigd_x, om_x, rx_delayed;

  syndrome_block u_syn (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sop(in_sop),
    .in_data(in_data), .syn_valid(syn_valid), .syn(syn)
  );

  if (FOLDED) begin : g_pf
    pfribm_kes u_kes (
      .clk(clk), .rst_n(rst_n), .start(syn_valid), .syn(syn),
      .done(kes_done), .sigma(sigma), .omega(omega)
    );
  end else begin : g_p
    pribm_kes u_kes (
      .clk(clk), .rst_n(rst_n), .start(syn_valid), .syn(syn),
      .done(kes_done), .sigma(sigma), .omega(omega)
    );
  end

  chien_search u_chien (
    .clk(clk), .rst_n(rst_n), .start(kes_done), .sigma(sigma),
    .eval_valid(eval_valid), .eval_sop(eval_sop), .sig_x(sig_x), .xsigd_x(xsigd_x)
  );

  forney_eval u_forney (
    .clk(clk), .rst_n(rst_n), .start(kes_done), .omega(omega), .om_x(om_x)
  );

  delay_fifo #(.W(M), .DEPTH(FIFO_LAT)) u_fifo (
    .clk(clk), .rst_n(rst_n), .din(in_data), .dout(rx_delayed)
  );

  error_correction u_corr (
    .clk(clk), .rst_n(rst_n), .eval_valid(eval_valid), .eval_sop(eval_sop),
    .sig_x(sig_x), .xsigd_x(xsigd_x), .om_x(om_x), .rx_data(rx_delayed),
    .out_valid(out_valid), .out_sop(out_sop), .corr(out_data), .err(out_err)
  );

endmodule
