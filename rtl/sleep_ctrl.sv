// sleep_ctrl: the Sleep block.
//
// Puts the core in its lowest-power state by stopping its clock. The flag
// `sleeping` runs on the free clock: it is set on the rising edge that ends
// Q4 of a SLEEP instruction (sleep_req) and cleared on the first rising
// edge at which the external interrupt `wake` is high. A wake that comes
// together with the request cancels it. The core clock gclk passes clk
// through a latch-based clock gate enabled by !sleeping, so the edge that
// sets the flag still reaches the core (moving it to Q1 of the next
// instruction) and the next one is held back until the wake-up. Only this
// flag and the gate's latch toggle while the core sleeps. Clock gating and
// the wake-up by an external interrupt are the document's; the exact edge
// timing is this design's choice.
module sleep_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic sleep_req,
  input  logic wake,
  output logic gclk,
  output logic sleeping
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sleeping <= 1'b0;
    else if (wake)      sleeping <= 1'b0;
    else if (sleep_req) sleeping <= 1'b1;
  end

  clock_gate u_cg (
    .clk  (clk),
    .en   (!sleeping),
    .gclk (gclk)
  );

endmodule
