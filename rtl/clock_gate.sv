// clock_gate: latch-based clock gate.
//
// The enable is captured by a latch that is transparent while clk is low
// and closed while it is high, so gclk = clk AND latched enable can only
// start or stop between clock pulses and never produces a shortened pulse.
// This is the usual integrated clock-gating cell; a standard-cell flow
// replaces it with its library's gate. The latch is intended. sleep_ctrl
// uses one to stop the core clock; alu uses one for its input flip-flops.
module clock_gate (
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
