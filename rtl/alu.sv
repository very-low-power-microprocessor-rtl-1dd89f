// alu: 8-bit Arithmetic Logic Unit with registered, clock-gated inputs.
//
// Input A (W or the bit mask) and input B (the data bus or a literal) are
// captured in flip-flops at the end of Q2 and held for the rest of the
// instruction, so the combinational logic behind them switches at most
// once per instruction. The flip-flops are clocked through a latch-based
// clock gate (clock_gate) enabled by en: they see a clock edge only when
// they load. The result y (the dmdb_out bus) and the flags z, dc, c are
// combinational functions of the held inputs, the operation code and the
// carry input cin (STATUS.C, used by RLF/RRF). Subtraction is B - A with C
// and DC meaning "no borrow". Registering the inputs and gating their
// clock are the document's low-power measures; the operation set and its
// encoding are this design's own. Nothing else in the core is written on
// the edge at which these flip-flops load, so the gated clock's small delay
// behind clk cannot race with their inputs.
module alu
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  alu_op_t    op,
  input  logic       cin,
  output logic [7:0] y,
  output logic       z,
  output logic       dc,
  output logic       c
);

  logic [7:0] a_q, b_q;
  logic       b_clk;

  clock_gate u_cg (
    .clk  (clk),
    .en   (en),
    .gclk (b_clk)
  );

  always_ff @(posedge b_clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
    end
  end

  logic [8:0] sum;
  logic [4:0] nib;   // low-nibble sum; only its carry (DC) is used

  always_comb begin
    sum = '0;
    nib = '0;
    y   = '0;
    dc  = 1'b0;
    c   = 1'b0;
    unique case (op)
      ALU_PASSA: y = a_q;
      ALU_PASSB: y = b_q;
      ALU_ADD: begin
        sum = {1'b0, b_q} + {1'b0, a_q};
        nib = {1'b0, b_q[3:0]} + {1'b0, a_q[3:0]};
        y   = sum[7:0];
        c   = sum[8];
        dc  = nib[4];
      end
      ALU_SUB: begin
        // B + ~A + 1: the carry out is 1 when there is no borrow
        sum = {1'b0, b_q} + {1'b0, ~a_q} + 9'd1;
        nib = {1'b0, b_q[3:0]} + {1'b0, ~a_q[3:0]} + 5'd1;
        y   = sum[7:0];
        c   = sum[8];
        dc  = nib[4];
      end
      ALU_AND:  y = a_q & b_q;
      ALU_IOR:  y = a_q | b_q;
      ALU_XOR:  y = a_q ^ b_q;
      ALU_COM:  y = ~b_q;
      ALU_INC:  y = b_q + 8'd1;
      ALU_DEC:  y = b_q - 8'd1;
      ALU_RLF: begin
        y = {b_q[6:0], cin};
        c = b_q[7];
      end
      ALU_RRF: begin
        y = {cin, b_q[7:1]};
        c = b_q[0];
      end
      ALU_SWAP: y = {b_q[3:0], b_q[7:4]};
      ALU_CLR:  y = '0;
      default:  y = '0;
    endcase
    z = (y == '0);
  end

endmodule
