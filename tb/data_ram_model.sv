// data_ram_model: behavioural model of the external data RAM.
//
// 512 x 8 bits addressed by the core's 9-bit dmab. Reads are asynchronous:
// q follows the addressed word at all times. A write stores d on the rising
// clk edge while wr_n is low. Not synthesizable design content: it stands
// in for the memory chip on the board. The testbench may preload or
// inspect mem directly by hierarchical reference.
module data_ram_model (
  input  logic       clk,
  input  logic [8:0] addr,
  input  logic       wr_n,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic [7:0] mem [512];

  initial for (int i = 0; i < 512; i++) mem[i] = 8'h00;

  assign q = mem[addr];

  always @(posedge clk) if (!wr_n) mem[addr] <= d;
endmodule
