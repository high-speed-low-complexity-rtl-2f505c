// pribm_kes: pipelined reformulated inversionless Berlekamp-Massey (pRiBM)
// key-equation solver for t = T.
//
// 3t+1 processing elements PE0..PE3t form a chain: PE_i reads delta_(i+1)
// from PE_(i+1) (PE3t reads 0), and the control unit broadcasts gamma,
// delta0 (taken from PE0) and MC to all of them. Initial values:
//   delta_i = theta_i = S_i (i < 2t), 0 for 2t <= i < 3t, delta_3t = theta_3t = 1.
// With pipelined multipliers each RiBM iteration takes two cycles, so the 2t
// iterations take 4t cycles, after which PE0..PE(t-1) hold omega(x) and
// PE t..PE 2t hold sigma(x) (sigma_i = delta_(t+i)).
//
// Timing: `start` is a one-cycle pulse with the syndromes on `syn`; the PEs
// load on that cycle, iterate for 4t cycles, and `done` pulses 4t+2 cycles
// after `start`, with sigma/omega held in output registers until the next
// result (the PE registers alternate with zeros, so the held copy is this
// implementation's addition). A new `start` may come any time after `done`.
module pribm_kes
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  syn   [2*T],
  output logic done,
  output gf_t  sigma [T+1],
  output gf_t  omega [T]
);

  localparam int unsigned NPE = 3 * T + 1;

  gf_t  delta [NPE];
  gf_t  init  [NPE];
  gf_t  gamma, delta0;
  logic mc;

  logic       run_q;
  logic [6:0] cnt_q;
  logic       busy;

  always_comb
    for (int i = 0; i < NPE; i++)
      init[i] = (i < 2 * T) ? syn[i] : ((i == 3 * T) ? gf_t'(1) : gf_t'(0));

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    pribm_pe u_pe (
      .clk       (clk),
      .load      (start),
      .init_delta(init[i]),
      .init_theta(init[i]),
      .delta_next(i == NPE - 1 ? gf_t'(0) : delta[(i + 1) % NPE]),
      .gamma     (gamma),
      .delta0    (delta0),
      .mc        (mc),
      .delta     (delta[i])
    );
  end

  assign busy = run_q && (cnt_q < 7'(4 * T));

  pribm_ctrl u_ctrl (
    .clk      (clk),
    .load     (start),
    .busy     (busy),
    .delta0_in(delta[0]),
    .gamma    (gamma),
    .delta0   (delta0),
    .mc       (mc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run_q <= 1'b1;
        cnt_q <= '0;
      end else if (run_q) begin
        cnt_q <= cnt_q + 7'd1;
        if (cnt_q == 7'(4 * T)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (run_q && !start && cnt_q == 7'(4 * T)) begin
      for (int i = 0; i <= T; i++) sigma[i] <= delta[T + i];
      for (int i = 0; i < T; i++)  omega[i] <= delta[i];
    end

endmodule
