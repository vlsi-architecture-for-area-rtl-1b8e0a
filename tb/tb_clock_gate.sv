// tb_clock_gate: self-checking testbench for the latch-based clock gate.
// The enable is changed at random points in both clock phases. Checks: on
// every rising clock edge, gclk rises exactly when the enable was high during
// the preceding low phase; gclk never changes while clk is high except at the
// rising and falling edges (no glitches from enable changes during the high
// phase); gclk is low whenever clk is low.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  logic en_at_low;   // enable value just before the rising edge

  clock_gate dut (.clk, .en, .gclk);

  int checks = 0, failures = 0, edges = 0, gated = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: 10 time units, enable may change in the middle
      #3 en = 1'($urandom_range(1));
      #6 en_at_low = en;
      #1 clk = 1'b1;
      #1;
      checks++;
      if (gclk != en_at_low) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%0d, enable was %0d", cyc, gclk, en_at_low);
      end
      if (en_at_low) edges++; else gated++;
      // high phase: enable changes must not reach gclk
      #3 en = ~en;
      #1;
      checks++;
      if (gclk != en_at_low) begin
        failures++;
        $display("FAIL cycle %0d: gclk glitched to %0d", cyc, gclk);
      end
      #4 clk = 1'b0;
      #1;
      checks++;
      if (gclk != 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: gclk high while clk low", cyc);
      end
    end
    checks++;
    if (edges == 0 || gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
