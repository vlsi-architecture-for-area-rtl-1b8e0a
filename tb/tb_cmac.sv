// tb_cmac: self-checking testbench for the registered complex
// multiply-accumulate. Random data, coefficients (|coef| <= 1.0) and partial
// sums are applied every clock; one clock later the output must equal
// acc_in + floor((a*coef)/2^FRAC + 1/2) per component, computed here with
// 64-bit integers.
module tb_cmac;
  localparam int AW = 13, CW = 10, FRAC = 8, ACC_W = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ACC_W-1:0] acc_in_re, acc_in_im, acc_out_re, acc_out_im;
  logic signed [AW-1:0] a_re, a_im;
  logic signed [CW-1:0] coef_re, coef_im;

  cmac #(.AW(AW), .CW(CW), .FRAC(FRAC), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic longint rnd_div(longint p);
    // floor(p / 2^FRAC + 1/2)
    longint num;
    num = p + (longint'(1) << (FRAC - 1));
    return (num >= 0) ? num / (longint'(1) << FRAC)
                      : -((-num + (longint'(1) << FRAC) - 1) / (longint'(1) << FRAC));
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    acc_in_re = '0; acc_in_im = '0; a_re = '0; a_im = '0; coef_re = '0; coef_im = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (acc_out_re != 0 || acc_out_im != 0) failures++;
    for (int t = 0; t < 1000; t++) begin
      // values kept small enough that the sum fits ACC_W bits
      a_re      = AW'(int'($urandom_range(2800)) - 1400);
      a_im      = AW'(int'($urandom_range(2800)) - 1400);
      coef_re   = CW'(int'($urandom_range(362)) - 181);
      coef_im   = CW'(int'($urandom_range(362)) - 181);
      acc_in_re = ACC_W'(int'($urandom_range(6000)) - 3000);
      acc_in_im = ACC_W'(int'($urandom_range(6000)) - 3000);
      er = longint'(acc_in_re) + rnd_div(longint'(a_re) * coef_re - longint'(a_im) * coef_im);
      ei = longint'(acc_in_im) + rnd_div(longint'(a_re) * coef_im + longint'(a_im) * coef_re);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(acc_out_re) != er || longint'(acc_out_im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL: got (%0d,%0d) expected (%0d,%0d)", acc_out_re, acc_out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
