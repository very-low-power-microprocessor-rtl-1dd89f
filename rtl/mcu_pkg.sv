// mcu_pkg: types and constants shared by the microprocessor cell.
//
// The cell is an 8-bit Harvard RISC core with a 14-bit instruction word, a
// 13-bit program address and a 9-bit data address. This package holds the
// widths, the Gray-coded state type of the Control Block, the ALU operation
// codes, the addresses of the registers that live inside the core, and the
// control word (ctrl_t) that the Control Block sends to the Operation Block.
// Widths come from the published characteristics (8-bit data, 14-bit
// instructions) and the datapath drawing (13-bit pmab, 9-bit dmab); the
// operation codes and the control word layout are this design's own.
package mcu_pkg;

  localparam int unsigned IW  = 14;  // instruction width
  localparam int unsigned DW  = 8;   // data width
  localparam int unsigned PCW = 13;  // program counter / pmab width
  localparam int unsigned DAW = 9;   // data memory address width

  // Control Block state: one instruction cycle is four clocks, Gray coded so
  // that every transition changes a single state flip-flop.
  typedef enum logic [1:0] {
    ST_Q1 = 2'b00,   // fetch: IR <= pmdb_in, PC <= PC + 1
    ST_Q2 = 2'b01,   // operand read: ALU input registers load
    ST_Q3 = 2'b11,   // execute / write back: W, file register, flags
    ST_Q4 = 2'b10    // program flow: skip, GOTO, CALL, RETURN
  } state_t;

  // ALU operations. A is W or the bit mask, B is the data bus or a literal.
  typedef enum logic [3:0] {
    ALU_PASSA = 4'd0,   // y = A
    ALU_PASSB = 4'd1,   // y = B
    ALU_ADD   = 4'd2,   // y = B + A
    ALU_SUB   = 4'd3,   // y = B - A
    ALU_AND   = 4'd4,
    ALU_IOR   = 4'd5,
    ALU_XOR   = 4'd6,
    ALU_COM   = 4'd7,   // y = ~B
    ALU_INC   = 4'd8,   // y = B + 1
    ALU_DEC   = 4'd9,   // y = B - 1
    ALU_RLF   = 4'd10,  // y = {B[6:0], C}
    ALU_RRF   = 4'd11,  // y = {C, B[7:1]}
    ALU_SWAP  = 4'd12,  // y = {B[3:0], B[7:4]}
    ALU_CLR   = 4'd13   // y = 0
  } alu_op_t;

  // Registers held inside the core, decoded on the low 7 address bits in
  // every bank. Every other address is external RAM.
  localparam logic [6:0] ADDR_INDF   = 7'h00;
  localparam logic [6:0] ADDR_PCL    = 7'h02;
  localparam logic [6:0] ADDR_STATUS = 7'h03;
  localparam logic [6:0] ADDR_FSR    = 7'h04;
  localparam logic [6:0] ADDR_PCLATH = 7'h0A;

  // STATUS bit positions
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_DC  = 1;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_PD  = 3;
  localparam int unsigned ST_TO  = 4;
  localparam int unsigned ST_RP0 = 5;
  localparam int unsigned ST_RP1 = 6;
  localparam int unsigned ST_IRP = 7;

  localparam logic [7:0] STATUS_RESET = 8'h18;  // TO = PD = 1

  // Flag update mask, one bit per flag: {Z, DC, C}
  typedef struct packed {
    logic z;
    logic dc;
    logic c;
  } flags_t;

  // Control word from the Control Block to the Operation Block. All enables
  // are active high and act on the rising edge of the core clock.
  typedef struct packed {
    logic    ir_load;   // Q1: IR <= pmdb_in
    logic    pc_inc;    // Q1, and Q4 of a taken skip: PC <= PC + 1
    logic    alu_en;    // Q2: ALU input registers load
    logic    a_mask;    // ALU In A = Mask (else W)
    logic    b_lit;     // ALU In B = literal pmdb(7..0) (else data bus)
    alu_op_t alu_op;
    logic    f_rd;      // read file register / RAM
    logic    f_wr;      // Q3: write file register / RAM
    logic    w_wr;      // Q3: W <= ALU result
    flags_t  flags_en;  // Q3: flags to update
    logic    pc_jump;   // Q4: PC <= {PCLATH[4:3], k11}
    logic    push;      // Q4: stack <= PC
    logic    pop;       // Q4: PC <= stack top, pop
    logic    pd_clr;    // Q3 of SLEEP: PD <= 0, TO <= 1
    logic    wdt_clr;   // Q3 of CLRWDT: TO <= 1, PD <= 1
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

endpackage
