// sefdm_pkg: types and elaboration-time helpers shared by the SEFDM
// transmitter blocks.
//
// sym_t is one complex input symbol (two's complement I and Q, 8 bits each,
// the IFFT word size of the design). The functions compute quantised
// trigonometric constants at elaboration time; they are used for the IFFT
// twiddle factors and for the post-processing rotation ROM, so no table file
// is needed. A coefficient with F fraction bits represents
// round(2^F * cos(2*pi*num/den)) (and likewise for sin).
package sefdm_pkg;

  localparam int SYM_W = 8;

  typedef struct packed {
    logic signed [SYM_W-1:0] re;
    logic signed [SYM_W-1:0] im;
  } sym_t;

  localparam real TWO_PI = 6.283185307179586;

  // round(2^frac * cos(2*pi*num/den))
  function automatic int cos_q(int num, int den, int frac);
    real v;
    v = $cos(TWO_PI * real'(num) / real'(den)) * real'(64'(1) << frac);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // round(2^frac * sin(2*pi*num/den))
  function automatic int sin_q(int num, int den, int frac);
    real v;
    v = $sin(TWO_PI * real'(num) / real'(den)) * real'(64'(1) << frac);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // Reverse the low 'bits' bits of x.
  function automatic int bitrev(int x, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

endpackage
