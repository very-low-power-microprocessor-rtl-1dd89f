// w_reg: W, the working register (accumulator).
//
// Eight bits loaded from the ALU result bus (dmdb_out) on the rising core
// clock edge at the end of Q3 when the Control Block selects W as the
// destination (we, the active-high form of the drawing's wr_W_n). W feeds
// ALU input A. The register itself is the document's; the asynchronous
// reset to zero is this design's choice.
module w_reg #(
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
