// tb_ifft_r22: self-checking testbench for the parallel radix-2^2 IFFT.
//
// Two instances run side by side: the full IFFT and the first-stage-pruned
// one (PRUNE = 1), the latter fed vectors whose upper half is zero. A new
// random input vector enters every clock; each output is compared, after
// exactly the expected latency, with a direct IDFT
// X[k] = sum_n x[n] exp(+j 2 pi n k / N) computed in floating point here.
// Then the enable is dropped: the outputs must be zero one clock later, and
// the first vector accepted after re-enabling must come out correct.
module tb_ifft_r22;
  localparam int N   = 16;
  localparam int IW  = 8;
  localparam int S   = $clog2(N);
  localparam int OW  = IW + S + S/2 - 1;
  localparam int LAT = S + S/2 - 1;
  localparam real TOL = 6.0;            // LSB, from twiddle rounding
  localparam int NVEC = 200;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] in_re [N], in_im [N], pin_re [N], pin_im [N];
  logic signed [OW-1:0] out_re [N], out_im [N];
  logic signed [OW-1:0] pout_re_w [N], pout_im_w [N];

  ifft_r22 #(.N(N), .IW(IW)) dut (
    .clk, .rst_n, .en, .in_re, .in_im, .out_re, .out_im);
  ifft_r22 #(.N(N), .IW(IW), .PRUNE(1'b1)) dut_p (
    .clk, .rst_n, .en, .in_re(pin_re), .in_im(pin_im),
    .out_re(pout_re_w), .out_im(pout_im_w));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real max_err = 0.0;

  // Expected outputs, indexed by the cycle the vector was applied.
  real exp_re [NVEC+LAT+4][N], exp_im [NVEC+LAT+4][N];
  real pexp_re [NVEC+LAT+4][N], pexp_im [NVEC+LAT+4][N];

  task automatic idft(input logic signed [IW-1:0] xr [N], input logic signed [IW-1:0] xi [N],
                      output real yr [N], output real yi [N]);
    for (int k = 0; k < N; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = 6.283185307179586 * real'(n * k) / real'(N);
        yr[k] += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        yi[k] += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
    end
  endtask

  function automatic logic signed [IW-1:0] rnd();
    int v;
    v = int'($urandom_range(254)) - 127;   // symmetric range
    return IW'(v);
  endfunction

  task automatic cmp(input string tag, input int got_re, input int got_im,
                     input real er, input real ei);
    real d;
    d = ((real'(got_re) - er) > 0.0 ? real'(got_re) - er : er - real'(got_re));
    if (((real'(got_im) - ei) > 0.0 ? real'(got_im) - ei : ei - real'(got_im)) > d)
      d = ((real'(got_im) - ei) > 0.0 ? real'(got_im) - ei : ei - real'(got_im));
    if (d > max_err) max_err = d;
    checks++;
    if (d > TOL) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got (%0d,%0d) expected (%f,%f)", tag, got_re, got_im, er, ei);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real yr [N], yi [N];
    for (int n = 0; n < N; n++) begin
      in_re[n] = '0; in_im[n] = '0; pin_re[n] = '0; pin_im[n] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Reset state: outputs zero.
    for (int k = 0; k < N; k++) begin
      checks++;
      if (out_re[k] != 0 || out_im[k] != 0) failures++;
    end
    en <= 1'b1;
    // Stream NVEC vectors, one per clock; check each at t + LAT.
    for (int t = 0; t < NVEC + LAT + 1; t++) begin
      if (t < NVEC) begin
        for (int n = 0; n < N; n++) begin
          in_re[n] <= rnd(); in_im[n] <= rnd();
        end
      end
      #1;
      if (t < NVEC) begin
        for (int n = 0; n < N; n++) begin
          pin_re[n] = (n < N/2) ? in_re[n] : '0;
          pin_im[n] = (n < N/2) ? in_im[n] : '0;
        end
        idft(in_re, in_im, yr, yi);
        for (int k = 0; k < N; k++) begin exp_re[t][k] = yr[k]; exp_im[t][k] = yi[k]; end
        idft(pin_re, pin_im, yr, yi);
        for (int k = 0; k < N; k++) begin pexp_re[t][k] = yr[k]; pexp_im[t][k] = yi[k]; end
      end
      // Outputs visible now belong to the vector applied LAT clocks ago.
      if (t >= LAT && t - LAT < NVEC)
        for (int k = 0; k < N; k++)
          cmp("full", int'(out_re[k]), int'(out_im[k]), exp_re[t-LAT][k], exp_im[t-LAT][k]);
      if (t >= LAT - 1 && t - (LAT - 1) < NVEC)
        for (int k = 0; k < N; k++)
          cmp("pruned", int'(pout_re_w[k]), int'(pout_im_w[k]),
              pexp_re[t-LAT+1][k], pexp_im[t-LAT+1][k]);
      @(posedge clk);
    end
    // Disable: outputs must be cleared one clock later.
    en <= 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < N; k++) begin
      checks += 2;
      if (out_re[k] != 0 || out_im[k] != 0) failures++;
      if (pout_re_w[k] != 0 || pout_im_w[k] != 0) failures++;
    end
    repeat (4) @(posedge clk);
    #1;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (out_re[k] != 0 || out_im[k] != 0) failures++;
    end
    // Re-enable with one fresh vector; it must come out correct after LAT.
    en <= 1'b1;
    for (int n = 0; n < N; n++) begin in_re[n] <= rnd(); in_im[n] <= rnd(); end
    #1;
    idft(in_re, in_im, yr, yi);
    repeat (LAT) @(posedge clk);
    #1;
    for (int k = 0; k < N; k++) cmp("re-enable", int'(out_re[k]), int'(out_im[k]), yr[k], yi[k]);
    $display("max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
