// tb_sefdm_reorder: self-checking testbench for the zero insertion and
// reorder block. For every alpha = b/c with 1 <= b <= c <= C_MAX it applies
// random symbol sets and compares the registered output matrix, one clock
// later, with a matrix built the forward way: symbol t goes to position
// n = t*b of the zero-padded vector, i.e. row n mod c, column n div c; every
// other entry (including all rows >= c) must be zero.
module tb_sefdm_reorder;
  import sefdm_pkg::*;
  localparam int N = 16, C_MAX = 4, CFG_W = $clog2(C_MAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg_b = 1, cfg_c = 1;
  sym_t sym [N];
  sym_t z [C_MAX][N];
  sym_t ref_z [C_MAX][N];

  sefdm_reorder #(.N(N), .C_MAX(C_MAX)) dut (.clk, .rst_n, .cfg_b, .cfg_c, .sym, .z);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) sym[n] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 1; c <= C_MAX; c++) begin
      for (int b = 1; b <= c; b++) begin
        for (int r = 0; r < 20; r++) begin
          cfg_b <= CFG_W'(b); cfg_c <= CFG_W'(c);
          for (int n = 0; n < N; n++) begin
            sym[n].re <= SYM_W'($urandom_range(255));
            sym[n].im <= SYM_W'($urandom_range(255));
          end
          #1;
          for (int i = 0; i < C_MAX; i++)
            for (int m = 0; m < N; m++) ref_z[i][m] = '0;
          for (int t = 0; t < N; t++) ref_z[(t * b) % c][(t * b) / c] = sym[t];
          @(posedge clk);
          #1;
          for (int i = 0; i < C_MAX; i++)
            for (int m = 0; m < N; m++) begin
              checks++;
              if (z[i][m] != ref_z[i][m]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL b=%0d c=%0d z[%0d][%0d]=%h expected %h", b, c, i, m, z[i][m], ref_z[i][m]);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
