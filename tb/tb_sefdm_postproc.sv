// tb_sefdm_postproc: self-checking testbench for the post-processing block.
// Every clock it applies random IFFT outputs Y_i(k) for a random c (rows
// i >= c are zero, as switched-off IFFTs deliver), and checks, exactly
// C_MAX-1 clocks later, X(k) = sum_i exp(+j 2 pi i k/(c N)) Y_i(k) computed in
// floating point, within a rounding tolerance.
module tb_sefdm_postproc;
  localparam int N = 16, C_MAX = 4, YW = 13, CW = 10, OW = YW + 1;
  localparam int CFG_W = $clog2(C_MAX + 1), LAT = C_MAX - 1, NV = 300;
  localparam real TOL = 10.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg_c;
  logic signed [YW-1:0] y_re [C_MAX][N], y_im [C_MAX][N];
  logic signed [OW-1:0] x_re [N], x_im [N];

  sefdm_postproc #(.N(N), .C_MAX(C_MAX), .YW(YW), .CW(CW)) dut (
    .clk, .rst_n, .cfg_c, .y_re, .y_im, .x_re, .x_im);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real max_err = 0.0;
  real er [NV][N], ei [NV][N];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_c = '0;
    for (int i = 0; i < C_MAX; i++)
      for (int k = 0; k < N; k++) begin y_re[i][k] = '0; y_im[i][k] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NV + LAT; t++) begin
      if (t < NV) begin
        int c;
        c = 1 + $urandom_range(C_MAX - 1);
        cfg_c = CFG_W'(c);
        for (int i = 0; i < C_MAX; i++)
          for (int k = 0; k < N; k++) begin
            // rows together stay within the range a real symbol can produce
            y_re[i][k] = (i < c) ? YW'(int'($urandom_range(1400)) - 700) : '0;
            y_im[i][k] = (i < c) ? YW'(int'($urandom_range(1400)) - 700) : '0;
          end
        for (int k = 0; k < N; k++) begin
          er[t][k] = 0.0; ei[t][k] = 0.0;
          for (int i = 0; i < c; i++) begin
            real a;
            a = 6.283185307179586 * real'(i * k) / real'(c * N);
            er[t][k] += real'(y_re[i][k]) * $cos(a) - real'(y_im[i][k]) * $sin(a);
            ei[t][k] += real'(y_re[i][k]) * $sin(a) + real'(y_im[i][k]) * $cos(a);
          end
        end
      end
      #1;
      if (t >= LAT) begin
        for (int k = 0; k < N; k++) begin
          real d;
          d = real'(x_re[k]) - er[t-LAT][k]; if (d < 0.0) d = -d;
          if (d > max_err) max_err = d;
          checks++;
          if (d > TOL) failures++;
          d = real'(x_im[k]) - ei[t-LAT][k]; if (d < 0.0) d = -d;
          if (d > max_err) max_err = d;
          checks++;
          if (d > TOL) failures++;
        end
      end
      @(posedge clk);
      #1;
    end
    $display("max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
