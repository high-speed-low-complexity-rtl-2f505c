// rs_pkg: shared types, constants and constant-evaluation functions for the
// RS(255,239) decoder over GF(2^8).
//
// The field is built on the primitive polynomial p(x) = 1 + x^2 + x^3 + x^4 + x^8
// (0x11D) and alpha = 0x02, as used by the decoder's multiplier equations.
// The functions here are only used to compute constants at elaboration time
// (powers of alpha for the constant multipliers); the
// datapath multiplies with the pipelined multiplier gf_mul_pipe.
package rs_pkg;

  localparam int unsigned M = 8;                   // bits per symbol
  localparam int unsigned N = 255;                 // code length
  localparam int unsigned K = 239;                 // message length
  localparam int unsigned T = 8;                   // correctable symbol errors
  localparam logic [M:0]  PRIM_POLY = 9'h11D;      // 1 + x^2 + x^3 + x^4 + x^8

  typedef logic [M-1:0] gf_t;

  // Cycles from the syndrome-valid pulse to the key-equation solver's done
  // pulse: pRiBM needs 4t iteration cycles plus load and output registers;
  // PF-RiBM needs 2t iterations of 14 cycles plus load and output registers.
  localparam int unsigned PRIBM_LAT  = 4 * T + 2;
  localparam int unsigned PFRIBM_LAT = 2 * T * 14 + 1;

  // Multiply by alpha (shift and reduce).
  function automatic gf_t gf_xtime(gf_t a);
    return a[M-1] ? gf_t'({a[M-2:0], 1'b0} ^ PRIM_POLY[M-1:0]) : gf_t'({a[M-2:0], 1'b0});
  endfunction

  // Shift-and-add field multiplication.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t r = '0;
    gf_t x = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= x;
      x = gf_xtime(x);
    end
    return r;
  endfunction

  // alpha^e for any non-negative exponent.
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r = 8'h01;
    for (int unsigned i = 0; i < (e % N); i++) r = gf_xtime(r);
    return r;
  endfunction


endpackage
