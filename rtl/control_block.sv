// control_block: the Control Block.
//
// A four-state machine steps through one instruction cycle per four core
// clocks: Q1 fetch (IR loads, PC increments), Q2 operand read (DMDB reads
// the file register or RAM, the ALU input registers load), Q3 execute and
// write back (W or the file register, the flags, TO/PD), Q4 program flow
// (a taken skip increments the PC once more; GOTO, CALL and the returns
// load the PC; CALL pushes and the returns pop the STACK). The states are
// Gray coded (Q1 00, Q2 01, Q3 11, Q4 10) so that each clock changes a
// single state flip-flop. The decoder turns the instruction on the pmdb bus
// into the control word ctrl (see mcu_pkg::ctrl_t), gated by the state so
// that each enable is high for exactly one clock. The skip decisions of
// DECFSZ, INCFSZ, BTFSC and BTFSS use the ALU's Z output in Q4.
//
// The Sleep block is part of this block: SLEEP raises sleep_req in Q4,
// which stops the core clock gclk until ext_int is high; the machine and the
// whole Operation Block run on gclk. clk is the free-running input clock.
//
// The Gray coding, the Sleep block with clock gating and the use of Z by
// the control come from the document; the number of states, what each
// state does and the instruction encodings (the 14-bit instruction set the
// core implements) are this design's choices.
module control_block
  import mcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ext_int,
  input  logic [13:0] ir,
  input  logic        alu_z,
  output logic        gclk,
  output ctrl_t       ctrl,
  output state_t      state,
  output logic        sleeping
);

  // ---------------------------------------------------------------- state
  state_t state_nxt;

  always_comb begin
    unique case (state)
      ST_Q1:   state_nxt = ST_Q2;
      ST_Q2:   state_nxt = ST_Q3;
      ST_Q3:   state_nxt = ST_Q4;
      ST_Q4:   state_nxt = ST_Q1;
      default: state_nxt = ST_Q1;
    endcase
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) state <= ST_Q1;
    else        state <= state_nxt;
  end

  // -------------------------------------------------------------- decoder
  // Static decode of the instruction held in IR.
  alu_op_t op;
  logic    a_mask, b_lit, rd_f, dest_f, dest_w;
  flags_t  fl;
  logic    skip_on_z, skip_on_nz, is_goto, is_call, is_ret, is_sleep, is_clrwdt;
  logic    d;

  always_comb begin
    op         = ALU_PASSB;
    a_mask     = 1'b0;
    b_lit      = 1'b0;
    rd_f       = 1'b0;
    dest_f     = 1'b0;
    dest_w     = 1'b0;
    fl         = '0;
    skip_on_z  = 1'b0;
    skip_on_nz = 1'b0;
    is_goto    = 1'b0;
    is_call    = 1'b0;
    is_ret     = 1'b0;
    is_sleep   = 1'b0;
    is_clrwdt  = 1'b0;
    d          = ir[7];

    unique case (ir[13:12])
      2'b00: begin  // byte-oriented file register operations
        rd_f   = 1'b1;
        dest_f = d;
        dest_w = !d;
        unique case (ir[11:8])
          4'b0000: begin
            rd_f   = 1'b0;
            dest_w = 1'b0;
            if (ir[7]) begin           // MOVWF f
              op = ALU_PASSA;
            end else begin
              dest_f = 1'b0;
              unique case (ir[6:0])
                7'h08, 7'h09: is_ret    = 1'b1;  // RETURN, RETFIE
                7'h63:        is_sleep  = 1'b1;  // SLEEP
                7'h64:        is_clrwdt = 1'b1;  // CLRWDT
                default:      ;                  // NOP
              endcase
            end
          end
          4'b0001: begin op = ALU_CLR;  rd_f = 1'b0; fl.z = 1'b1; end   // CLRW / CLRF
          4'b0010: begin op = ALU_SUB;  fl = '{z: 1'b1, dc: 1'b1, c: 1'b1}; end  // SUBWF
          4'b0011: begin op = ALU_DEC;  fl.z = 1'b1; end                // DECF
          4'b0100: begin op = ALU_IOR;  fl.z = 1'b1; end                // IORWF
          4'b0101: begin op = ALU_AND;  fl.z = 1'b1; end                // ANDWF
          4'b0110: begin op = ALU_XOR;  fl.z = 1'b1; end                // XORWF
          4'b0111: begin op = ALU_ADD;  fl = '{z: 1'b1, dc: 1'b1, c: 1'b1}; end  // ADDWF
          4'b1000: begin op = ALU_PASSB; fl.z = 1'b1; end               // MOVF
          4'b1001: begin op = ALU_COM;  fl.z = 1'b1; end                // COMF
          4'b1010: begin op = ALU_INC;  fl.z = 1'b1; end                // INCF
          4'b1011: begin op = ALU_DEC;  skip_on_z = 1'b1; end           // DECFSZ
          4'b1100: begin op = ALU_RRF;  fl.c = 1'b1; end                // RRF
          4'b1101: begin op = ALU_RLF;  fl.c = 1'b1; end                // RLF
          4'b1110: begin op = ALU_SWAP; end                             // SWAPF
          default: begin op = ALU_INC;  skip_on_z = 1'b1; end           // INCFSZ
        endcase
      end
      2'b01: begin  // bit-oriented operations, operand A from the Mask
        a_mask = 1'b1;
        rd_f   = 1'b1;
        unique case (ir[11:10])
          2'b00:   begin op = ALU_AND; dest_f = 1'b1; end  // BCF (mask inverted)
          2'b01:   begin op = ALU_IOR; dest_f = 1'b1; end  // BSF
          2'b10:   begin op = ALU_AND; skip_on_z  = 1'b1; end  // BTFSC
          default: begin op = ALU_AND; skip_on_nz = 1'b1; end  // BTFSS
        endcase
      end
      2'b10: begin  // CALL / GOTO
        is_call = !ir[11];
        is_goto = ir[11];
      end
      default: begin  // literal operations, operand B is the literal
        b_lit  = 1'b1;
        dest_w = 1'b1;
        unique casez (ir[11:8])
          4'b00??: op = ALU_PASSB;                                       // MOVLW
          4'b01??: begin op = ALU_PASSB; is_ret = 1'b1; end              // RETLW
          4'b1000: begin op = ALU_IOR; fl.z = 1'b1; end                  // IORLW
          4'b1001: begin op = ALU_AND; fl.z = 1'b1; end                  // ANDLW
          4'b1010: begin op = ALU_XOR; fl.z = 1'b1; end                  // XORLW
          4'b110?: begin op = ALU_SUB; fl = '{z: 1'b1, dc: 1'b1, c: 1'b1}; end  // SUBLW
          4'b111?: begin op = ALU_ADD; fl = '{z: 1'b1, dc: 1'b1, c: 1'b1}; end  // ADDLW
          default: begin op = ALU_PASSB; dest_w = 1'b0; end              // 1011: no operation
        endcase
      end
    endcase
  end

  // ------------------------------------------------- state-gated control
  logic skip_taken;
  logic sleep_req;

  assign skip_taken = (skip_on_z && alu_z) || (skip_on_nz && !alu_z);
  assign sleep_req  = (state == ST_Q4) && is_sleep;

  always_comb begin
    ctrl          = CTRL_IDLE;
    ctrl.a_mask   = a_mask;
    ctrl.b_lit    = b_lit;
    ctrl.alu_op   = op;
    ctrl.ir_load  = (state == ST_Q1);
    ctrl.pc_inc   = (state == ST_Q1) || ((state == ST_Q4) && skip_taken);
    ctrl.alu_en   = (state == ST_Q2);
    ctrl.f_rd     = (state == ST_Q2) && rd_f;
    ctrl.f_wr     = (state == ST_Q3) && dest_f;
    ctrl.w_wr     = (state == ST_Q3) && dest_w;
    ctrl.flags_en = (state == ST_Q3) ? fl : '0;
    ctrl.pd_clr   = (state == ST_Q3) && is_sleep;
    ctrl.wdt_clr  = (state == ST_Q3) && is_clrwdt;
    ctrl.pc_jump  = (state == ST_Q4) && (is_goto || is_call);
    ctrl.push     = (state == ST_Q4) && is_call;
    ctrl.pop      = (state == ST_Q4) && is_ret;
  end

  // ---------------------------------------------------------- Sleep block
  sleep_ctrl u_sleep (
    .clk       (clk),
    .rst_n     (rst_n),
    .sleep_req (sleep_req),
    .wake      (ext_int),
    .gclk      (gclk),
    .sleeping  (sleeping)
  );

endmodule
