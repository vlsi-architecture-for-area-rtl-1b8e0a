// rot_coef_rom: read-only table of the post-processing rotation coefficient
// for one IFFT row i and one output sample k.
//
// The SEFDM output sample X(k) adds the output of IFFT i multiplied by
// exp(+j*2*pi*i*k/(c*N)). The coefficient depends on the runtime c, so this
// ROM holds one precalculated entry per possible c (1..C_MAX) and c is its
// address. Entries are computed at elaboration time as
// round(2^(CW-2) * cos/sin(2*pi*I*K/(c*N))), i.e. CW-bit two's complement with
// CW-2 fraction bits (1.0 is representable). For rows the configuration does
// not use (I >= c) and for an illegal address the entry is 0.
//
// Combinational (a table lookup); the caller registers around it. Storing
// the coefficients in ROM follows the document; the one-ROM-per-(i,k) split
// and the coefficient width are this design's choices.
module rot_coef_rom
  import sefdm_pkg::*;
#(
  parameter int N     = 16,
  parameter int C_MAX = 4,
  parameter int CW    = 10,
  parameter int I     = 1,      // IFFT row
  parameter int K     = 0,      // output sample index
  localparam int CFG_W = $clog2(C_MAX + 1)
) (
  input  logic [CFG_W-1:0]     cfg_c,
  output logic signed [CW-1:0] c_re,
  output logic signed [CW-1:0] c_im
);
  localparam int F = CW - 2;

  typedef logic signed [CW-1:0] coef_t [C_MAX+1];

  function automatic coef_t build(bit imag);
    coef_t t;
    for (int c = 0; c <= C_MAX; c++) begin
      if (c == 0 || I >= c) t[c] = '0;
      else if (imag)         t[c] = CW'(sin_q(I * K, c * N, F));
      else                   t[c] = CW'(cos_q(I * K, c * N, F));
    end
    return t;
  endfunction

  localparam coef_t TAB_RE = build(1'b0);
  localparam coef_t TAB_IM = build(1'b1);

  always_comb begin
    if (int'(cfg_c) <= C_MAX) begin
      c_re = TAB_RE[cfg_c];
      c_im = TAB_IM[cfg_c];
    end else begin
      c_re = '0;
      c_im = '0;
    end
  end
endmodule
