// delay_fifo: fixed-latency delay buffer for the received symbols.
//
// Holds every input word for exactly DEPTH cycles so that a received symbol
// leaves the buffer in the same cycle as the error value computed for it.
// It is a circular RAM of DEPTH words with a single address that advances
// every cycle: each cycle the old word at the address is read (registered)
// and the new one is written, giving dout(t) = din(t - DEPTH) for DEPTH >= 2.
// Organisation, width and depth are this implementation's choices; the RAM
// contents are not reset, the address is.
module delay_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 297
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH - 1 > 1) ? $clog2(DEPTH - 1) : 1;

  logic [W-1:0]  mem [DEPTH-1];
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) addr_q <= '0;
    else        addr_q <= (addr_q == AW'(DEPTH - 2)) ? '0 : addr_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    dout         <= mem[addr_q];
    mem[addr_q]  <= din;
  end

endmodule
