// fsr_reg: FSR, the file select register used for indirect addressing.
//
// Eight bits written from the ALU result bus when an instruction writes
// file address 0x04 (we, the active-high form of the drawing's en_fsr_n),
// on the rising core clock edge at the end of Q3. When an instruction
// addresses INDF (address 0), the DMDB uses {IRP, FSR} as the data address.
// The register is the document's; the reset to zero is this design's choice.
module fsr_reg #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end

endmodule
