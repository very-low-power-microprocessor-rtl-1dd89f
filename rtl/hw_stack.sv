// hw_stack: internal return-address STACK.
//
// A shift register of DEPTH entries of PCW bits; entry 0 is the top of the
// stack and is always on the output, so a RETURN can load the PC and pop in
// the same clock edge. A push shifts every entry one place down and writes
// din into entry 0; a pop shifts every entry one place up, the bottom entry
// keeping its value. A push onto a full stack loses the oldest (bottom)
// entry and there is no overflow or underflow flag. That the STACK is a
// shift register follows the names the datapath drawing prints on it
// (fw_sr, clk_sr) and its regular, custom-laid-out structure; the depth
// (8) and the behaviour on underflow are this design's choices. The 13-bit
// width is the PC's.
module hw_stack #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned PCW   = 13
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  logic           pop,
  input  logic [PCW-1:0] din,
  output logic [PCW-1:0] top
);

  logic [PCW-1:0] sr [DEPTH];

  assign top = sr[0];

  // Entries are cleared by reset so that a stray RETURN lands at address 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (push) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end else if (pop) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
    end
  end

endmodule
