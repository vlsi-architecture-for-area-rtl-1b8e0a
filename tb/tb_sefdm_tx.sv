// tb_sefdm_tx: end-to-end self-checking testbench of the SEFDM transmitter at
// its default parameters (N = 16, C_MAX = 4), next to a second instance with
// the first IFFT stage pruned (PRUNE = 1).
//
// For a sequence of bandwidth compressions alpha = b/c the testbench streams
// random symbol sets (mostly back to back, with random idle cycles), computes
// each SEFDM symbol directly, X(k) = sum_n s_n exp(+j 2 pi n k b/(c N)), in
// floating point, and checks every output sample within a small rounding
// tolerance, and that it appears exactly LATENCY clocks after its input.
// Between configurations it waits for busy to fall and switches alpha. It
// also checks that the IFFTs a configuration does not use hold zero at their
// outputs. Every mechanism (each alpha, mode switches, switched-off IFFTs,
// back-to-back throughput, idle cycles, pruned operation) is counted and must
// occur at least once.
module tb_sefdm_tx;
  import sefdm_pkg::*;

  localparam int N       = 16;
  localparam int C_MAX   = 4;
  localparam int S       = $clog2(N);
  localparam int CFG_W   = $clog2(C_MAX + 1);
  localparam int IFFT_W  = SYM_W + S + S/2 - 1;
  localparam int OUT_W   = IFFT_W + 1;
  localparam int LATENCY = 1 + (S + S/2 - 1) + C_MAX - 1;   // 9
  localparam int NSYM    = 60;          // symbol sets per configuration
  localparam real TOL    = 16.0;        // LSB

  typedef struct {
    int  due;
    real re [N];
    real im [N];
  } exp_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg_b, cfg_c, pcfg_b, pcfg_c;
  logic in_valid, pin_valid;
  sym_t in_sym [N];
  logic out_valid, busy, pout_valid, pbusy;
  logic signed [OUT_W-1:0] out_re [N], out_im [N], pout_re [N], pout_im [N];

  sefdm_tx dut (
    .clk, .rst_n, .cfg_b, .cfg_c, .in_valid, .in_sym,
    .out_valid, .out_re, .out_im, .busy);

  sefdm_tx #(.PRUNE(1'b1)) dut_p (
    .clk, .rst_n, .cfg_b(pcfg_b), .cfg_c(pcfg_c), .in_valid(pin_valid), .in_sym,
    .out_valid(pout_valid), .out_re(pout_re), .out_im(pout_im), .busy(pbusy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real max_err = 0.0;
  exp_t q [$], pq [$];

  // mechanism counters
  int n_alpha [C_MAX+1][C_MAX+1];
  int n_switch = 0, n_gated = 0, n_b2b = 0, n_idle = 0, n_pruned = 0, n_out = 0;
  logic prev_out_valid = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic exp_t model(input sym_t s [N], input int b, input int c, input int due);
    exp_t e;
    e.due = due;
    for (int k = 0; k < N; k++) begin
      e.re[k] = 0.0; e.im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = 6.283185307179586 * real'(n * k * b) / real'(c * N);
        e.re[k] += real'(s[n].re) * $cos(a) - real'(s[n].im) * $sin(a);
        e.im[k] += real'(s[n].re) * $sin(a) + real'(s[n].im) * $cos(a);
      end
    end
    return e;
  endfunction

  task automatic check_out(input string tag, input exp_t e,
                           input logic signed [OUT_W-1:0] gr [N],
                           input logic signed [OUT_W-1:0] gi [N]);
    checks++;
    if (e.due != cycle) begin
      failures++;
      $display("FAIL %s: output at cycle %0d, expected at %0d", tag, cycle, e.due);
    end
    for (int k = 0; k < N; k++) begin
      real d;
      d = absr(real'(gr[k]) - e.re[k]);
      if (absr(real'(gi[k]) - e.im[k]) > d) d = absr(real'(gi[k]) - e.im[k]);
      if (d > max_err) max_err = d;
      checks++;
      if (d > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s k=%0d: got (%0d,%0d) expected (%f,%f)", tag, k,
                   gr[k], gi[k], e.re[k], e.im[k]);
      end
    end
  endtask

  // Output monitor.
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      n_out++;
      if (prev_out_valid) n_b2b++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else check_out("full", q.pop_front(), out_re, out_im);
      // IFFTs beyond c are switched off and must output zero.
      for (int i = 0; i < C_MAX; i++) begin
        if (i >= int'(cfg_c)) begin
          n_gated++;
          checks++;
          case (i)
            1: if (dut.g_ifft[1].u_ifft.out_re[3] != 0 || dut.g_ifft[1].u_ifft.out_im[5] != 0) failures++;
            2: if (dut.g_ifft[2].u_ifft.out_re[7] != 0 || dut.g_ifft[2].u_ifft.out_im[1] != 0) failures++;
            3: if (dut.g_ifft[3].u_ifft.out_re[0] != 0 || dut.g_ifft[3].u_ifft.out_im[9] != 0) failures++;
            default: ;
          endcase
        end
      end
    end
    prev_out_valid = out_valid;
    if (pout_valid) begin
      n_pruned++;
      if (pq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected pruned output at cycle %0d", cycle);
      end else check_out("pruned", pq.pop_front(), pout_re, pout_im);
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // alpha = b/c sequence; the pruned instance runs the entries with 2b <= c.
  int cfg_list [9][2] = '{'{1,2}, '{2,3}, '{3,4}, '{1,1}, '{1,4}, '{1,3}, '{2,4}, '{4,4}, '{1,2}};

  initial begin
    in_valid = 1'b0; pin_valid = 1'b0;
    cfg_b = 1; cfg_c = 2; pcfg_b = 1; pcfg_c = 2;
    for (int n = 0; n < N; n++) in_sym[n] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (cfg_list[j]) begin
      int b, c;
      bit use_p;
      b = cfg_list[j][0]; c = cfg_list[j][1];
      use_p = (2 * b <= c);
      // wait until the pipelines are empty, then switch alpha
      while (busy || pbusy) @(posedge clk);
      if (j > 0) n_switch++;
      cfg_b <= CFG_W'(b); cfg_c <= CFG_W'(c);
      if (use_p) begin pcfg_b <= CFG_W'(b); pcfg_c <= CFG_W'(c); end
      @(posedge clk);
      for (int t = 0; t < NSYM; t++) begin
        if ($urandom_range(4) == 0) begin
          n_idle++;
          in_valid <= 1'b0; pin_valid <= 1'b0;
          @(posedge clk);
        end
        for (int n = 0; n < N; n++) begin
          in_sym[n].re <= SYM_W'(int'($urandom_range(254)) - 127);
          in_sym[n].im <= SYM_W'(int'($urandom_range(254)) - 127);
        end
        in_valid <= 1'b1;
        pin_valid <= use_p;
        #1;
        q.push_back(model(in_sym, b, c, cycle + LATENCY));
        if (use_p) pq.push_back(model(in_sym, b, c, cycle + LATENCY - 1));
        n_alpha[b][c]++;
        @(posedge clk);
      end
      in_valid <= 1'b0; pin_valid <= 1'b0;
      @(posedge clk);
    end
    while (busy || pbusy) @(posedge clk);
    repeat (3) @(posedge clk);
    // every expected output must have appeared
    checks++;
    if (q.size() != 0 || pq.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d outputs missing", q.size(), pq.size());
    end
    // every mechanism must have happened
    foreach (cfg_list[j]) begin
      checks++;
      if (n_alpha[cfg_list[j][0]][cfg_list[j][1]] == 0) failures++;
    end
    checks += 6;
    if (n_switch == 0) begin failures++; $display("FAIL: no mode switch"); end
    if (n_gated == 0)  begin failures++; $display("FAIL: no switched-off IFFT"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back outputs"); end
    if (n_idle == 0)   begin failures++; $display("FAIL: no idle cycle"); end
    if (n_pruned == 0) begin failures++; $display("FAIL: no pruned operation"); end
    if (n_out != $size(cfg_list) * NSYM) begin failures++; $display("FAIL: output count %0d", n_out); end
    $display("outputs %0d, pruned %0d, switches %0d, gated-IFFT checks %0d, back-to-back %0d, idle %0d, max error %f LSB",
             n_out, n_pruned, n_switch, n_gated, n_b2b, n_idle, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
