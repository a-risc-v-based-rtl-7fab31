// siwa_clkgate: glitch-free clock gate (latch + AND), the cell used to turn
// whole Siwa blocks off to save dynamic power. The enable is sampled by a
// latch that is transparent while clk is low, so gclk only starts or stops
// at a rising edge boundary and never produces a short pulse.
// gclk = clk & en_latched.
module siwa_clkgate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en;
  end
  assign gclk = clk & en_l;
endmodule
