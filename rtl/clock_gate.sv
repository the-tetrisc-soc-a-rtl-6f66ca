// clock_gate: integrated clock gate that switches a core's clock off for the
// power-saving (destress) mode and for cores taken out of service. The
// enable is captured by a latch that is transparent while the clock is low,
// so gclk never glitches; gclk = clk AND latched enable. The latch is
// intended (standard ICG structure). test_en forces the clock on.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en | test_en;
  end

  assign gclk = clk & en_l;

endmodule
