// tb_rot_coef_rom: self-checking testbench for the rotation coefficient ROM.
// Instantiates the ROM for every row i = 1..C_MAX-1 and every sample
// k = 0..N-1, reads it at every address c = 0..C_MAX, and compares with
// 2^(CW-2) * exp(+j 2 pi i k /(c N)) computed in floating point (within half
// an LSB), or with zero where the row is unused (i >= c) or c = 0.
module tb_rot_coef_rom;
  localparam int N = 16, C_MAX = 4, CW = 10, CFG_W = $clog2(C_MAX + 1);

  logic clk = 1'b0;
  logic [CFG_W-1:0] cfg_c = '0;
  logic signed [CW-1:0] c_re [C_MAX][N], c_im [C_MAX][N];

  for (genvar i = 1; i < C_MAX; i++) begin : g_i
    for (genvar k = 0; k < N; k++) begin : g_k
      rot_coef_rom #(.N(N), .C_MAX(C_MAX), .CW(CW), .I(i), .K(k)) dut (
        .cfg_c, .c_re(c_re[i][k]), .c_im(c_im[i][k]));
    end
  end

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= C_MAX; c++) begin
      cfg_c = CFG_W'(c);
      @(posedge clk);
      for (int i = 1; i < C_MAX; i++) begin
        for (int k = 0; k < N; k++) begin
          real er, ei, sc;
          sc = real'(1 << (CW - 2));
          if (c == 0 || i >= c) begin
            er = 0.0; ei = 0.0;
          end else begin
            er = sc * $cos(6.283185307179586 * real'(i * k) / real'(c * N));
            ei = sc * $sin(6.283185307179586 * real'(i * k) / real'(c * N));
          end
          checks++;
          if ((real'(c_re[i][k]) - er) > 0.5001 || (er - real'(c_re[i][k])) > 0.5001 ||
              (real'(c_im[i][k]) - ei) > 0.5001 || (ei - real'(c_im[i][k])) > 0.5001) begin
            failures++;
            if (failures < 10)
              $display("FAIL c=%0d i=%0d k=%0d: got (%0d,%0d) expected (%f,%f)",
                       c, i, k, c_re[i][k], c_im[i][k], er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
