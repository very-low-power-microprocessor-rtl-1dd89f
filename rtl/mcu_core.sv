// mcu_core: the microprocessor cell.
//
// An 8-bit Harvard RISC core with 14-bit instructions, built for very low
// power: the control state machine is Gray coded, the ALU inputs are held
// in registers that load once per instruction, and a SLEEP instruction
// stops the core clock until an external interrupt. It is fully static, so
// clk may run at any rate down to 0 Hz.
//
// Two blocks make it up. The Control Block steps through four clocks per
// instruction (Q1 fetch, Q2 operand read, Q3 execute/write back, Q4 program
// flow), decodes the instruction and drives the Operation Block, which
// holds IR, PC, STACK, W, STATUS, FSR, PCLatH, the ALU, the Mask and the
// Data Memory Decoder Block.
//
// Interface. Program memory: the core puts pmab out and expects the
// instruction on pmdb_in before the rising clk edge that ends Q1
// (asynchronous ROM). Data memory: dmab and the active-low strobes rd_n
// (Q2) and wr_n (Q3); read data on dmdb_in_mem is taken at the end of Q2,
// write data on dmdb_out is to be stored by the RAM on the rising clk edge
// that ends Q3 (the edge at which wr_n is low). The registers held in the
// core (INDF, PCL, STATUS, FSR, PCLATH) never reach the RAM strobes.
// ext_int wakes the core from SLEEP. dbg_* outputs give the test
// observability of W, STATUS, PC and the control state.
//
// The block split, the bus names and widths and the low-power measures are
// the document's; the instruction timing, the control word and reset values
// are this design's choices.
module mcu_core
  import mcu_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ext_int,
  output logic [PCW-1:0] pmab,
  input  logic [IW-1:0]  pmdb_in,
  output logic [DAW-1:0] dmab,
  input  logic [DW-1:0]  dmdb_in_mem,
  output logic [DW-1:0]  dmdb_out,
  output logic           rd_n,
  output logic           wr_n,
  output logic           sleeping,
  output logic [DW-1:0]  dbg_w,
  output logic [DW-1:0]  dbg_status,
  output logic [PCW-1:0] dbg_pc,
  output logic [1:0]     dbg_state
);

  logic        gclk;
  ctrl_t       ctrl;
  state_t      state;
  logic [IW-1:0] pmdb;
  logic        alu_z;

  control_block u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .ext_int  (ext_int),
    .ir       (pmdb),
    .alu_z    (alu_z),
    .gclk     (gclk),
    .ctrl     (ctrl),
    .state    (state),
    .sleeping (sleeping)
  );

  operation_block #(.STACK_DEPTH(STACK_DEPTH)) u_op (
    .clk         (gclk),
    .rst_n       (rst_n),
    .ctrl        (ctrl),
    .pmab        (pmab),
    .pmdb_in     (pmdb_in),
    .dmab        (dmab),
    .dmdb_in_mem (dmdb_in_mem),
    .dmdb_out    (dmdb_out),
    .rd_n        (rd_n),
    .wr_n        (wr_n),
    .pmdb        (pmdb),
    .alu_z       (alu_z),
    .dbg_w       (dbg_w),
    .dbg_status  (dbg_status)
  );

  assign dbg_pc    = pmab;
  assign dbg_state = state;

endmodule
