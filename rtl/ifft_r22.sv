// ifft_r22: fully parallel, pipelined N-point IFFT on the radix-2^2
// decimation-in-frequency flow graph, with clock-gating enable and optional
// pruning of the first trellis stage.
//
// How it works. The log2(N) butterfly stages each combine pairs of words a
// span h = N/2^(s+1) apart (sum in the upper word, difference in the lower).
// Radix-2^2 splits every radix-2 twiddle into a trivial rotation by +j, applied
// in front of every second (odd) stage to the last quarter of each block of 4h
// words, and one non-trivial twiddle exp(+j*2*pi*bitrev2(q)*n3/(4h)) applied
// after that stage (q = quarter of the 4h block, n3 = offset inside it).
// The trivial rotations are just swaps and negations. Outputs leave the flow
// graph in bit-reversed order and are put back in natural order by wiring.
// Each stage and each twiddle multiplier is followed by a register, so a new
// set of N words is accepted on every clock.
//
// Word growth: one bit per butterfly stage and one per non-trivial twiddle,
// so no scaling is needed; for N = 16 and 8-bit input the output is 13 bits.
// No word may be the most negative value of its width (input -2^(IW-1) is not
// allowed; QAM constellations are symmetric so this costs nothing).
//
// Enable: when en is low, the clock of the internal pipeline registers is
// gated off (clock_gate) and the output registers are cleared to zero on the
// next clock, so a disabled IFFT contributes nothing to a sum of IFFT outputs.
//
// Pruning (PRUNE = 1): valid only when the upper N/2 inputs are always zero,
// as they are for bandwidth compression alpha <= 1/2. Every first-stage
// butterfly then has a zero input and simply copies its other input to both
// outputs, so the whole first stage (N/2 butterflies and its register) is
// removed and in_re/in_im[N/2..N-1] are ignored.
//
// Latency: LAT = log2(N) + log2(N)/2 - 1 - PRUNE clock cycles (5 for N = 16).
//
// The radix-2^2 flow graph, the 16-point 8-bit size, the enable behaviour and
// the pruning follow the document; full-precision word growth, twiddle word
// size, pipeline placement and the fully parallel form are this design's
// choices.
module ifft_r22
  import sefdm_pkg::*;
#(
  parameter int N     = 16,            // transform size, a power of 4
  parameter int IW    = 8,             // input word width (I and Q each)
  parameter int CW    = 10,            // twiddle coefficient width
  parameter bit PRUNE = 1'b0,          // remove the first trellis stage
  localparam int S    = $clog2(N),
  localparam int OW   = IW + S + S/2 - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,    // asynchronous, active low
  input  logic                 en,
  input  logic signed [IW-1:0] in_re [N],
  input  logic signed [IW-1:0] in_im [N],
  output logic signed [OW-1:0] out_re [N],
  output logic signed [OW-1:0] out_im [N]
);
  localparam int F = CW - 2;            // twiddle fraction bits

  // Width at the output of butterfly stage s: input + (s+1) butterflies
  // + the twiddles that came before it (after stages 1, 3, ...).
  function automatic int bf_w(int s);
    return IW + s + 1 + s / 2;
  endfunction

  // A non-trivial twiddle follows every odd stage except the last.
  function automatic bit has_tw(int s);
    return (s % 2 == 1) && (s < S - 1);
  endfunction

  logic gclk;
  clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  for (genvar s = 0; s < S; s++) begin : g_st
    localparam int H  = N >> (s + 1);            // butterfly span
    localparam int WI = (s == 0) ? IW : (has_tw(s - 1) ? bf_w(s - 1) + 1 : bf_w(s - 1));
    localparam int WO = bf_w(s);

    logic signed [WI-1:0] x_re [N], x_im [N];    // stage input
    logic signed [WI-1:0] r_re [N], r_im [N];    // after trivial +j rotation
    logic signed [WO-1:0] b_re [N], b_im [N];    // butterfly output
    logic signed [WO-1:0] q_re [N], q_im [N];    // registered stage output

    if (s == 0) begin : g_in
      assign x_re = in_re;
      assign x_im = in_im;
    end else if (has_tw(s - 1)) begin : g_in
      assign x_re = g_st[s-1].g_tw.t_re;
      assign x_im = g_st[s-1].g_tw.t_im;
    end else begin : g_in
      assign x_re = g_st[s-1].q_re;
      assign x_im = g_st[s-1].q_im;
    end

    // Trivial rotation by +j on the last quarter of each 4H block (odd stages).
    always_comb begin
      for (int p = 0; p < N; p++) begin
        if ((s % 2 == 1) && ((p % (4 * H)) >= 3 * H)) begin
          r_re[p] = -x_im[p];
          r_im[p] = x_re[p];
        end else begin
          r_re[p] = x_re[p];
          r_im[p] = x_im[p];
        end
      end
    end

    // Butterflies.
    always_comb begin
      for (int p = 0; p < N; p++) begin
        if ((p % (2 * H)) < H) begin
          b_re[p] = WO'(r_re[p]) + WO'(r_re[p + H]);
          b_im[p] = WO'(r_im[p]) + WO'(r_im[p + H]);
        end else begin
          b_re[p] = WO'(r_re[p - H]) - WO'(r_re[p]);
          b_im[p] = WO'(r_im[p - H]) - WO'(r_im[p]);
        end
      end
    end

    if (PRUNE && s == 0) begin : g_pruned
      // Upper half of the input is zero: each butterfly passes its upper
      // input to both outputs. No adders, no register.
      for (genvar p = 0; p < N; p++) begin : g_w
        assign q_re[p] = WO'(x_re[p % H]);
        assign q_im[p] = WO'(x_im[p % H]);
      end
    end else if (s == S - 1) begin : g_out_reg
      // Output register on the free-running clock, cleared when disabled.
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int p = 0; p < N; p++) begin
            q_re[p] <= '0;
            q_im[p] <= '0;
          end
        end else begin
          for (int p = 0; p < N; p++) begin
            q_re[p] <= en ? b_re[p] : '0;
            q_im[p] <= en ? b_im[p] : '0;
          end
        end
      end
    end else begin : g_reg
      always_ff @(posedge gclk or negedge rst_n) begin
        if (!rst_n) begin
          for (int p = 0; p < N; p++) begin
            q_re[p] <= '0;
            q_im[p] <= '0;
          end
        end else begin
          q_re <= b_re;
          q_im <= b_im;
        end
      end
    end

    if (has_tw(s)) begin : g_tw
      localparam int M = 4 * H;                  // block the twiddle spans
      logic signed [WO:0] m_re [N], m_im [N];
      logic signed [WO:0] t_re [N], t_im [N];
      for (genvar p = 0; p < N; p++) begin : g_mul
        localparam int PP = p % M;
        localparam int E  = bitrev(PP / H, 2) * (PP % H);
        localparam logic signed [CW-1:0] C_RE = CW'(cos_q(E, M, F));
        localparam logic signed [CW-1:0] C_IM = CW'(sin_q(E, M, F));
        cmult #(.AW(WO), .CW(CW), .FRAC(F)) u_mul (
          .a_re(q_re[p]), .a_im(q_im[p]), .c_re(C_RE), .c_im(C_IM),
          .y_re(m_re[p]), .y_im(m_im[p])
        );
      end
      always_ff @(posedge gclk or negedge rst_n) begin
        if (!rst_n) begin
          for (int p = 0; p < N; p++) begin
            t_re[p] <= '0;
            t_im[p] <= '0;
          end
        end else begin
          t_re <= m_re;
          t_im <= m_im;
        end
      end
    end
  end

  // Bit-reversed flow-graph order back to natural order.
  for (genvar k = 0; k < N; k++) begin : g_order
    assign out_re[k] = g_st[S-1].q_re[bitrev(k, S)];
    assign out_im[k] = g_st[S-1].q_im[bitrev(k, S)];
  end

  initial begin
    assert (N >= 4 && (1 << S) == N && S % 2 == 0)
      else $error("ifft_r22: N must be a power of 4");
  end
endmodule
