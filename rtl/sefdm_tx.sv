// sefdm_tx: spectrally efficient FDM (SEFDM) baseband transmitter built from
// c parallel IFFTs.
//
// An SEFDM symbol carries N complex symbols s_n on sub-carriers spaced
// alpha/T apart, alpha = b/c < 1, so the carriers overlap and are not
// orthogonal. Its N time samples are
//   X(k) = sum_{n=0}^{N-1} s_n exp(+j*2*pi*n*k*b/(c*N)),  k = 0..N-1.
// Writing the sum over a zero-padded vector of length c*N (s_n at position
// n*b) and splitting that index as i + m*c gives
//   X(k) = sum_{i=0}^{c-1} exp(+j*2*pi*i*k/(c*N)) * IFFT_N(row i)(k),
// so the transmitter is: zero insertion and reorder (sefdm_reorder), C_MAX
// parallel N-point radix-2^2 IFFTs (ifft_r22) of which the first c are enabled,
// and post-processing that rotates and sums the IFFT outputs with CMACs and
// coefficient ROMs (sefdm_postproc). IFFTs i >= c have their clock gated and
// their outputs cleared, which saves their power and removes them from the sum.
// alpha = 1 (b = c) gives plain OFDM.
//
// Interface: in_valid with N symbols sym_t {re, im} (8-bit two's complement,
// -128 not allowed) per clock, every clock if wanted. cfg_b and cfg_c select
// alpha = b/c, 1 <= b <= c <= C_MAX; they may change only while busy is low
// (no symbol in flight) and must be applied at least one clock before the
// first symbol that uses them. out_valid marks the N output samples
// X(0..N-1), OUT_W bits each, LATENCY clocks after the input (9 for the
// defaults; 8 with PRUNE). Outputs are not normalised by 1/sqrt(N).
//
// PRUNE = 1 removes the first trellis stage of every IFFT, which is valid
// only for alpha <= 1/2 (then the upper half of every IFFT input is zero).
//
// The decomposition, the multiplexer-based reorder, the parallel IFFTs with
// clock-gating enables, the CMAC/ROM post-processing and the first-stage
// pruning follow the document; C_MAX, word sizes, the fully parallel N-sample
// interface and the valid/busy handshake are this design's choices.
module sefdm_tx
  import sefdm_pkg::*;
#(
  parameter int N      = 16,      // sub-carriers = IFFT size (power of 4)
  parameter int C_MAX  = 4,       // parallel IFFTs = largest c
  parameter int COEF_W = 10,      // twiddle and rotation coefficient width
  parameter bit PRUNE  = 1'b0,    // prune the first IFFT stage (alpha <= 1/2)
  localparam int S       = $clog2(N),
  localparam int CFG_W   = $clog2(C_MAX + 1),
  localparam int IFFT_W  = SYM_W + S + S/2 - 1,
  localparam int OUT_W   = IFFT_W + 1,
  localparam int IFFT_LAT = S + S/2 - 1 - int'(PRUNE),
  localparam int LATENCY = 1 + IFFT_LAT + C_MAX - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,        // asynchronous, active low
  input  logic [CFG_W-1:0]        cfg_b,
  input  logic [CFG_W-1:0]        cfg_c,
  input  logic                    in_valid,
  input  sym_t                    in_sym  [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re  [N],
  output logic signed [OUT_W-1:0] out_im  [N],
  output logic                    busy
);
  // ---- zero insertion and reorder -------------------------------------
  sym_t z [C_MAX][N];

  sefdm_reorder #(.N(N), .C_MAX(C_MAX)) u_reorder (
    .clk, .rst_n, .cfg_b, .cfg_c, .sym(in_sym), .z);

  // ---- parallel IFFTs ---------------------------------------------------
  logic signed [IFFT_W-1:0] y_re [C_MAX][N], y_im [C_MAX][N];

  for (genvar i = 0; i < C_MAX; i++) begin : g_ifft
    logic signed [SYM_W-1:0] a_re [N], a_im [N];
    logic en;
    for (genvar m = 0; m < N; m++) begin : g_split
      assign a_re[m] = z[i][m].re;
      assign a_im[m] = z[i][m].im;
    end
    assign en = (i < int'(cfg_c));
    ifft_r22 #(.N(N), .IW(SYM_W), .CW(COEF_W), .PRUNE(PRUNE)) u_ifft (
      .clk, .rst_n, .en, .in_re(a_re), .in_im(a_im),
      .out_re(y_re[i]), .out_im(y_im[i]));
  end

  // ---- valid and c travel with the data ---------------------------------
  logic             v_pipe [LATENCY];
  logic [CFG_W-1:0] c_pipe [1 + IFFT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < LATENCY; t++) v_pipe[t] <= 1'b0;
      for (int t = 0; t < 1 + IFFT_LAT; t++) c_pipe[t] <= '0;
    end else begin
      v_pipe[0] <= in_valid;
      c_pipe[0] <= cfg_c;
      for (int t = 1; t < LATENCY; t++) v_pipe[t] <= v_pipe[t-1];
      for (int t = 1; t < 1 + IFFT_LAT; t++) c_pipe[t] <= c_pipe[t-1];
    end
  end

  // ---- post-processing --------------------------------------------------
  sefdm_postproc #(.N(N), .C_MAX(C_MAX), .YW(IFFT_W), .CW(COEF_W)) u_post (
    .clk, .rst_n, .cfg_c(c_pipe[IFFT_LAT]), .y_re, .y_im, .x_re(out_re), .x_im(out_im));

  assign out_valid = v_pipe[LATENCY-1];

  always_comb begin
    busy = 1'b0;
    for (int t = 0; t < LATENCY; t++) busy |= v_pipe[t];
  end

  // ---- configuration rules ---------------------------------------------
  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (cfg_b >= 1 && cfg_b <= cfg_c && int'(cfg_c) <= C_MAX))
    else $error("sefdm_tx: illegal alpha = %0d/%0d", cfg_b, cfg_c);
  if (PRUNE) begin : g_prune_rule
    a_cfg_prune: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> (2 * int'(cfg_b) <= int'(cfg_c)))
      else $error("sefdm_tx: PRUNE needs alpha <= 1/2");
  end
  a_cfg_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (busy || in_valid) |-> ($stable(cfg_b) && $stable(cfg_c)))
    else $error("sefdm_tx: configuration changed with symbols in flight");

  initial begin
    assert (C_MAX >= 2) else $error("sefdm_tx: C_MAX must be at least 2");
  end
endmodule
