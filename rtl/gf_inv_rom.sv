// gf_inv_rom: 256 x 8 ROM of multiplicative inverses in GF(2^8).
//
// inv = a^-1, with the unused entry for a = 0 holding 0. The table is
// computed at elaboration time from the field polynomial (the inverse of
// alpha^e is alpha^(255-e)), so it needs no data file.
// The read is registered: inv is valid one cycle after a.
module gf_inv_rom
  import rs_pkg::*;
(
  input  logic clk,
  input  gf_t  a,
  output gf_t  inv
);

  typedef gf_t table_t [256];

  // Walk the powers of alpha once: the inverse of alpha^e is alpha^(255-e).
  function automatic table_t make_table();
    table_t t;
    gf_t    pw [N];
    pw[0] = 8'h01;
    for (int e = 1; e < N; e++) pw[e] = gf_xtime(pw[e-1]);
    t[0] = '0;
    for (int e = 0; e < N; e++) t[pw[e]] = pw[(N - e) % N];
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) inv <= ROM[a];

endmodule
