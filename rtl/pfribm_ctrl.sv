// pfribm_ctrl: control unit of the PF-RiBM key-equation solver.
//
// A modulo-(FOLD+1) counter splits time into iterations of FOLD+1 cycles:
// cycles 0..FOLD-1 issue one coefficient each, cycles 1..FOLD write results.
// delta0, gamma and MC are registered and held for a whole iteration; on the
// last cycle of an iteration the RiBM bookkeeping is done:
//   gamma <= MC ? delta0 : gamma,   k <= MC ? -k-1 : k+1,
//   delta0 <= new delta_0 of PE0, MC <= delta0 != 0 && k >= 0.
// The new delta_0 is taken from PE0's delta_2 register two cycles earlier
// (cycle FOLD-2) and its zero test runs through a two-stage pipelined OR tree,
// so no long path ends in the control registers.
// After 2t iterations `done` is raised for one cycle, when all coefficients
// hold their final values. `start` loads delta0 = S0, gamma = 1, k = 0.
// The registered outputs follow the decoder's design (pipelined control
// outputs); the iteration count and the done pulse are this
// implementation's. k is 6 bits, signed.
module pfribm_ctrl
  import rs_pkg::*;
#(
  parameter int unsigned FOLD = 13
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        s0,          // S0, delta_0 at the start
  input  gf_t        pe0_tap,     // PE0 register delta_2 (chain[2]): new delta_0 at cycle FOLD-2
  output logic [3:0] cyc,
  output logic       issue,
  output logic       write,
  output gf_t        gamma,
  output gf_t        delta0,
  output logic       mc,
  output logic       done
);

  logic              run_q;
  logic [4:0]        iter_q;
  logic signed [5:0] k_q, k_new;
  gf_t               d0_new_q;      // new delta_0, captured at cycle FOLD-2
  logic [1:0]        or_part_q;     // first level of the pipelined OR tree
  logic              nz_q;          // new delta_0 != 0

  assign issue = run_q && (cyc < 4'(FOLD));
  assign write = run_q && (cyc != 4'd0);
  assign k_new = mc ? ~k_q : k_q + 6'sd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      done   <= 1'b0;
      cyc    <= '0;
      iter_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run_q  <= 1'b1;
        cyc    <= '0;
        iter_q <= '0;
      end else if (run_q) begin
        if (cyc == 4'(FOLD)) begin
          cyc    <= '0;
          iter_q <= iter_q + 5'd1;
          if (iter_q == 5'(2 * T - 1)) begin
            run_q <= 1'b0;
            done  <= 1'b1;
          end
        end else begin
          cyc <= cyc + 4'd1;
        end
      end
    end
  end

  // Pipelined zero test of the new delta_0: it passes PE0's delta_2 register
  // at cycle FOLD-2; the OR tree takes two cycles and is ready at cycle FOLD.
  always_ff @(posedge clk) begin
    if (cyc == 4'(FOLD - 2)) begin
      d0_new_q  <= pe0_tap;
      or_part_q <= {|pe0_tap[7:4], |pe0_tap[3:0]};
    end
    if (cyc == 4'(FOLD - 1)) nz_q <= |or_part_q;
  end

  always_ff @(posedge clk) begin
    if (start) begin
      gamma  <= 8'h01;
      k_q    <= '0;
      delta0 <= s0;
      mc     <= (s0 != 0);
    end else if (run_q && cyc == 4'(FOLD)) begin
      if (mc) gamma <= delta0;
      k_q    <= k_new;
      delta0 <= d0_new_q;
      mc     <= nz_q && !k_new[5];
    end
  end

endmodule
