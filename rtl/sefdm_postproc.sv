// sefdm_postproc: combines the c parallel IFFT outputs into the SEFDM time
// samples.
//
// X(k) = Y_0(k) + sum_{i=1}^{c-1} exp(+j*2*pi*i*k/(c*N)) * Y_i(k),
// k = 0..N-1, where Y_i is the N-point IFFT of row i of the reordered symbol
// matrix. Every output sample k has a chain of C_MAX-1 CMACs: CMAC i takes the
// partial sum from CMAC i-1 (Y_0 for the first), multiplies Y_i(k) by its
// rotation coefficient from a rot_coef_rom addressed by c, and adds. Y_i and c
// are delayed i-1 clocks so they meet their partial sum. Rows i >= c are zero
// (switched-off IFFTs clear their outputs) and their coefficients are zero,
// so the chain length is fixed and the same hardware serves every c.
//
// Interface: one set of C_MAX x N IFFT outputs per clock together with the c
// it was produced with. Latency C_MAX-1 clocks, one set per clock.
//
// The CMAC/ROM structure and the (c-1) operations per sample follow the
// document; the parallel chains, delays and word sizes are this design's
// choices. C_MAX must be at least 2.
module sefdm_postproc #(
  parameter int N     = 16,
  parameter int C_MAX = 4,
  parameter int YW    = 13,          // IFFT output width
  parameter int CW    = 10,          // coefficient width
  localparam int OW    = YW + 1,     // output sample width
  localparam int CFG_W = $clog2(C_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CFG_W-1:0]     cfg_c,
  input  logic signed [YW-1:0] y_re [C_MAX][N],
  input  logic signed [YW-1:0] y_im [C_MAX][N],
  output logic signed [OW-1:0] x_re [N],
  output logic signed [OW-1:0] x_im [N]
);
  // acc[i] is the output of CMAC i; acc[0] is Y_0 widened.
  logic signed [OW-1:0] acc_re [C_MAX][N], acc_im [C_MAX][N];
  // c delayed by i-1 clocks for CMAC i.
  logic [CFG_W-1:0] c_d [C_MAX];

  assign c_d[0] = cfg_c;
  assign c_d[1] = cfg_c;
  for (genvar i = 2; i < C_MAX; i++) begin : g_cdel
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) c_d[i] <= '0;
      else        c_d[i] <= c_d[i-1];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_k
    assign acc_re[0][k] = OW'(y_re[0][k]);
    assign acc_im[0][k] = OW'(y_im[0][k]);
  end

  for (genvar i = 1; i < C_MAX; i++) begin : g_row
    // Delay line of i-1 stages for Y_i; d_re[0] is the undelayed input.
    logic signed [YW-1:0] d_re [i][N], d_im [i][N];
    for (genvar k = 0; k < N; k++) begin : g_in
      assign d_re[0][k] = y_re[i][k];
      assign d_im[0][k] = y_im[i][k];
    end
    for (genvar d = 1; d < i; d++) begin : g_del
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < N; k++) begin
            d_re[d][k] <= '0;
            d_im[d][k] <= '0;
          end
        end else begin
          d_re[d] <= d_re[d-1];
          d_im[d] <= d_im[d-1];
        end
      end
    end
    for (genvar k = 0; k < N; k++) begin : g_k
      logic signed [CW-1:0] w_re, w_im;
      rot_coef_rom #(.N(N), .C_MAX(C_MAX), .CW(CW), .I(i), .K(k)) u_rom (
        .cfg_c(c_d[i]), .c_re(w_re), .c_im(w_im));
      cmac #(.AW(YW), .CW(CW), .FRAC(CW - 2), .ACC_W(OW)) u_cmac (
        .clk, .rst_n,
        .acc_in_re(acc_re[i-1][k]), .acc_in_im(acc_im[i-1][k]),
        .a_re(d_re[i-1][k]), .a_im(d_im[i-1][k]),
        .coef_re(w_re), .coef_im(w_im),
        .acc_out_re(acc_re[i][k]), .acc_out_im(acc_im[i][k]));
    end
  end

  assign x_re = acc_re[C_MAX-1];
  assign x_im = acc_im[C_MAX-1];
endmodule
