// cmac: registered complex multiply-accumulate, acc_out = acc_in + a * coef.
//
// The product is formed by cmult (coefficient with FRAC fraction bits,
// rounded) and added to the incoming partial sum; the result is registered,
// so one CMAC is one pipeline stage (latency one clock, one operation per
// clock). Chaining c-1 of them gives the post-processing sum of one output
// sample. The CMAC as the post-processing element follows the document; the
// word sizes and rounding are this design's choices. ACC_W must be at least
// AW + 1.
module cmac #(
  parameter int AW    = 13,     // data width of a
  parameter int CW    = 10,     // coefficient width
  parameter int FRAC  = 8,      // coefficient fraction bits
  parameter int ACC_W = 14      // accumulator width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACC_W-1:0] acc_in_re,
  input  logic signed [ACC_W-1:0] acc_in_im,
  input  logic signed [AW-1:0]    a_re,
  input  logic signed [AW-1:0]    a_im,
  input  logic signed [CW-1:0]    coef_re,
  input  logic signed [CW-1:0]    coef_im,
  output logic signed [ACC_W-1:0] acc_out_re,
  output logic signed [ACC_W-1:0] acc_out_im
);
  logic signed [AW:0] p_re, p_im;

  cmult #(.AW(AW), .CW(CW), .FRAC(FRAC)) u_mul (
    .a_re, .a_im, .c_re(coef_re), .c_im(coef_im), .y_re(p_re), .y_im(p_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_out_re <= '0;
      acc_out_im <= '0;
    end else begin
      acc_out_re <= acc_in_re + ACC_W'(p_re);
      acc_out_im <= acc_in_im + ACC_W'(p_im);
    end
  end
endmodule
