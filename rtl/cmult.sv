// cmult: combinational complex multiplier by a fixed-point coefficient.
//
// y = round((a_re + j a_im) * (c_re + j c_im) / 2^FRAC). The coefficient has
// FRAC fraction bits and magnitude at most 1, so the result needs one bit more
// than the data word (a rotation can turn a corner value (v, v) into
// (0, v*sqrt(2))). Rounding is round-half-up, applied by adding 2^(FRAC-1)
// before the arithmetic shift. Used for the IFFT twiddle factors and inside
// the post-processing CMACs; the word sizes are this design's choice.
module cmult #(
  parameter int AW   = 12,          // data width
  parameter int CW   = 10,          // coefficient width
  parameter int FRAC = 8            // coefficient fraction bits
) (
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [CW-1:0] c_re,
  input  logic signed [CW-1:0] c_im,
  output logic signed [AW:0]   y_re,
  output logic signed [AW:0]   y_im
);
  localparam int PW = AW + CW + 1;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FRAC - 1);

  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    p_re = PW'(a_re) * PW'(c_re) - PW'(a_im) * PW'(c_im);
    p_im = PW'(a_re) * PW'(c_im) + PW'(a_im) * PW'(c_re);
    y_re = (AW+1)'((p_re + HALF) >>> FRAC);
    y_im = (AW+1)'((p_im + HALF) >>> FRAC);
  end
endmodule
