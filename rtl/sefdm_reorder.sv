// sefdm_reorder: zero insertion and reordering of the input symbols for the
// c parallel IFFTs.
//
// For bandwidth compression alpha = b/c the N input symbols s_t are spread
// over a vector of length c*N, symbol s_t at position n = t*b and zeros
// everywhere else, and that vector is read as a c x N matrix in column-major
// order: element n goes to row i = n mod c, column m = n div c, i.e. to input
// m of IFFT i. No buffer for the sparse matrix is built. Each IFFT input
// instead has a multiplexer that picks the one symbol that can land there,
// s_t with t = (i + m*c)/b, when (i + m*c) is a multiple of b and t < N, and
// 0 + j0 otherwise. Rows i >= c (IFFTs that are switched off) get zeros.
//
// Interface: one set of N symbols per clock on sym, configuration b and c
// (1 <= b <= c <= C_MAX) held stable while data flows. Output z[i][m] is
// registered: latency one clock, throughput one symbol set per clock.
//
// The placement rule and the multiplexer-instead-of-buffer idea follow the
// document; the parallel N-symbol input and the output register are this
// design's choices.
module sefdm_reorder
  import sefdm_pkg::*;
#(
  parameter int N     = 16,
  parameter int C_MAX = 4,
  localparam int CFG_W = $clog2(C_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CFG_W-1:0] cfg_b,
  input  logic [CFG_W-1:0] cfg_c,
  input  sym_t             sym [N],
  output sym_t             z   [C_MAX][N]
);
  localparam int IW = $clog2(C_MAX * N) + 1;   // holds i + m*c and t

  sym_t z_d [C_MAX][N];

  always_comb begin
    for (int i = 0; i < C_MAX; i++) begin
      for (int m = 0; m < N; m++) begin
        logic [IW-1:0] n, t;
        n = IW'(i) + IW'(m) * IW'(cfg_c);
        t = (cfg_b != 0) ? n / IW'(cfg_b) : '0;
        z_d[i][m] = '0;
        if (i < int'(cfg_c) && cfg_b != 0 && (n % IW'(cfg_b)) == 0 && t < IW'(N))
          z_d[i][m] = sym[t[$clog2(N)-1:0]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < C_MAX; i++)
        for (int m = 0; m < N; m++) z[i][m] <= '0;
    end else begin
      z <= z_d;
    end
  end
endmodule
