// clock_gate: integrated clock gate (latch + AND) for an IFFT's enable.
//
// The enable is captured by a latch that is transparent while clk is low, so
// it is stable during the high phase and gclk = clk & en_lat carries no
// glitches. When en is low gclk stays low and the registers it drives hold
// their contents and do not toggle, which is the power saving the enable is
// for. The latch is intentional: it is the standard glitch-free gating cell
// and lint tools report it as a latch by design. In an ASIC flow this module
// would be replaced by the library's clock-gating cell.
//
// Timing: a change of en seen before a rising edge of clk takes effect on
// that edge.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
