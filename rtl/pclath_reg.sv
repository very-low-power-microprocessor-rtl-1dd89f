// pclath_reg: PCLatH, the latch for the upper program-counter bits.
//
// Software writes it at file address 0x0A; it takes the low W bits of the
// ALU result bus on the rising core clock edge at the end of Q3 (we, the
// active-high form of the drawing's en_pclath_n). Bits 4..3 supply the top
// of the PC on GOTO and CALL, bits 4..0 on a write to PCL. Only those five
// bits are stored (the drawing brings out PCLatH(4..0)); the unstored upper
// bits read as zero. Reset to zero is this design's choice.
module pclath_reg #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end

endmodule
