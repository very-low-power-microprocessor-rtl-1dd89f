// ir_reg: Instruction Register (IR).
//
// Holds the 14-bit instruction fetched from the program memory. It loads
// pmdb_in on the rising edge of the core clock at the end of state Q1 (when
// load is high) and keeps it for the rest of the instruction cycle; its
// output is the internal pmdb bus that feeds the Control Block decoder, the
// DMDB (file address), the Mask, the PC (jump target) and the literal path.
// The 14-bit width is the document's; the asynchronous reset to the NOP
// encoding (all zeros) is this design's choice.
module ir_reg #(
  parameter int unsigned IW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [IW-1:0] pmdb_in,
  output logic [IW-1:0] pmdb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pmdb <= '0;
    else if (load) pmdb <= pmdb_in;
  end

endmodule
