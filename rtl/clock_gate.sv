// clock_gate -- glitch-free clock gate for the stage clocks G_ck1..G_ck3.
//
// The enable is captured by a latch that is transparent while clk is low
// and the gated clock is clk AND the latched enable, so gclk can only start
// or stop while clk is low and never produces a shortened pulse. This is the
// usual integrated clock-gating cell; in a standard-cell flow it is replaced
// by the library's cell. The latch is intended (the tools report it as an
// inferred latch). Timing: an enable change made in one clock cycle takes
// effect at the next rising edge of clk.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch
    if (!clk) en_lat = en;

  assign gclk = clk && en_lat;

endmodule
