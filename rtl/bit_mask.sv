// bit_mask: Mask generator for the bit instructions.
//
// Takes pmdb(11..7) of the current instruction: bits 9..7 name the bit,
// bits 11..10 the operation (00 BCF, 01 BSF, 10 BTFSC, 11 BTFSS). It puts a
// one-hot byte with that bit set on ALU input A, or its complement for BCF,
// so that BCF is done by the ALU as an AND, BSF as an IOR, and the two bit
// tests as an AND whose Z result tells the Control Block whether to skip.
// Purely combinational. That the Mask takes pmdb(11..7) and feeds ALU
// input A is from the datapath drawing; the inverted form for BCF is this
// design's choice.
module bit_mask (
  input  logic [4:0] sel,   // pmdb(11..7)
  output logic [7:0] mask
);

  logic [7:0] onehot;

  always_comb begin
    onehot = 8'b1 << sel[2:0];
    mask   = (sel[4:3] == 2'b00) ? ~onehot : onehot;
  end

endmodule
