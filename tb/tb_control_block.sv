// tb_control_block: self-checking testbench for control_block.
//
// Holds one instruction at a time on the ir input and walks the state
// machine through its four states, checking that the states follow
// Q1 -> Q2 -> Q3 -> Q4 with codes 00, 01, 11, 10 (one bit changing per
// clock) and that every control signal is what a table written by hand
// from the instruction set expects in each state: ALU operation and operand
// selects, read in Q2, write of W or the file register in Q3 with the right
// flags, PC increment in Q1 and (for a taken skip, decided from alu_z) in
// Q4, jumps, pushes and pops in Q4. SLEEP must stop the gated clock until
// ext_int is raised.
module tb_control_block;
  import mcu_pkg::*;
  import asm14_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        ext_int = 1'b0;
  logic [13:0] ir;
  logic        alu_z;
  logic        gclk, sleeping;
  ctrl_t       ctrl;
  state_t      state;
  int checks = 0, failures = 0, gcount = 0, skips = 0;

  control_block dut (.clk(clk), .rst_n(rst_n), .ext_int(ext_int), .ir(ir), .alu_z(alu_z),
                     .gclk(gclk), .ctrl(ctrl), .state(state), .sleeping(sleeping));

  always #5 clk = ~clk;
  always @(posedge gclk) gcount++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected decode: op, a_mask, b_lit, rd, wf, ww, flags{z,dc,c}, jump, push, pop, skz, sknz
  typedef struct {
    logic [13:0] ir;
    int op;
    bit am, bl, rd, wf, ww;
    bit [2:0] fl;
    bit jump, push, pop, skz, sknz;
    string name;
  } exp_t;

  exp_t tbl[$];

  task automatic add(input logic [13:0] w, input int op, input bit am, bl, rd, wf, ww,
                     input bit [2:0] fl, input bit jump, push, pop, skz, sknz, input string name);
    exp_t e;
    e.ir = w; e.op = op; e.am = am; e.bl = bl; e.rd = rd; e.wf = wf; e.ww = ww; e.fl = fl;
    e.jump = jump; e.push = push; e.pop = pop; e.skz = skz; e.sknz = sknz; e.name = name;
    tbl.push_back(e);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    // op codes: 0 PASSA 1 PASSB 2 ADD 3 SUB 4 AND 5 IOR 6 XOR 7 COM 8 INC 9 DEC 10 RLF 11 RRF 12 SWAP 13 CLR
    //            ir               op am bl rd wf ww fl      jmp psh pop skz sknz
    add(MOVWF('h21),               0, 0, 0, 0, 1, 0, 3'b000, 0, 0, 0, 0, 0, "MOVWF");
    add(CLRF('h21),               13, 0, 0, 0, 1, 0, 3'b100, 0, 0, 0, 0, 0, "CLRF");
    add(CLRW(),                   13, 0, 0, 0, 0, 1, 3'b100, 0, 0, 0, 0, 0, "CLRW");
    add(SUBWF('h21, TO_W),         3, 0, 0, 1, 0, 1, 3'b111, 0, 0, 0, 0, 0, "SUBWF");
    add(DECF('h21, TO_F),          9, 0, 0, 1, 1, 0, 3'b100, 0, 0, 0, 0, 0, "DECF");
    add(IORWF('h21, TO_F),         5, 0, 0, 1, 1, 0, 3'b100, 0, 0, 0, 0, 0, "IORWF");
    add(ANDWF('h21, TO_W),         4, 0, 0, 1, 0, 1, 3'b100, 0, 0, 0, 0, 0, "ANDWF");
    add(XORWF('h21, TO_F),         6, 0, 0, 1, 1, 0, 3'b100, 0, 0, 0, 0, 0, "XORWF");
    add(ADDWF('h21, TO_F),         2, 0, 0, 1, 1, 0, 3'b111, 0, 0, 0, 0, 0, "ADDWF");
    add(MOVF('h21, TO_W),          1, 0, 0, 1, 0, 1, 3'b100, 0, 0, 0, 0, 0, "MOVF");
    add(COMF('h21, TO_F),          7, 0, 0, 1, 1, 0, 3'b100, 0, 0, 0, 0, 0, "COMF");
    add(INCF('h21, TO_W),          8, 0, 0, 1, 0, 1, 3'b100, 0, 0, 0, 0, 0, "INCF");
    add(DECFSZ('h21, TO_F),        9, 0, 0, 1, 1, 0, 3'b000, 0, 0, 0, 1, 0, "DECFSZ");
    add(RRF('h21, TO_F),          11, 0, 0, 1, 1, 0, 3'b001, 0, 0, 0, 0, 0, "RRF");
    add(RLF('h21, TO_W),          10, 0, 0, 1, 0, 1, 3'b001, 0, 0, 0, 0, 0, "RLF");
    add(SWAPF('h21, TO_F),        12, 0, 0, 1, 1, 0, 3'b000, 0, 0, 0, 0, 0, "SWAPF");
    add(INCFSZ('h21, TO_W),        8, 0, 0, 1, 0, 1, 3'b000, 0, 0, 0, 1, 0, "INCFSZ");
    add(BCF('h21, 3),              4, 1, 0, 1, 1, 0, 3'b000, 0, 0, 0, 0, 0, "BCF");
    add(BSF('h21, 5),              5, 1, 0, 1, 1, 0, 3'b000, 0, 0, 0, 0, 0, "BSF");
    add(BTFSC('h21, 1),            4, 1, 0, 1, 0, 0, 3'b000, 0, 0, 0, 1, 0, "BTFSC");
    add(BTFSS('h21, 7),            4, 1, 0, 1, 0, 0, 3'b000, 0, 0, 0, 0, 1, "BTFSS");
    add(CALL('h123),               1, 0, 0, 0, 0, 0, 3'b000, 1, 1, 0, 0, 0, "CALL");
    add(GOTO('h456),               1, 0, 0, 0, 0, 0, 3'b000, 1, 0, 0, 0, 0, "GOTO");
    add(RETURN(),                  1, 0, 0, 0, 0, 0, 3'b000, 0, 0, 1, 0, 0, "RETURN");
    add(RETFIE(),                  1, 0, 0, 0, 0, 0, 3'b000, 0, 0, 1, 0, 0, "RETFIE");
    add(MOVLW('h5A),               1, 0, 1, 0, 0, 1, 3'b000, 0, 0, 0, 0, 0, "MOVLW");
    add(RETLW('h5A),               1, 0, 1, 0, 0, 1, 3'b000, 0, 0, 1, 0, 0, "RETLW");
    add(IORLW('h5A),               5, 0, 1, 0, 0, 1, 3'b100, 0, 0, 0, 0, 0, "IORLW");
    add(ANDLW('h5A),               4, 0, 1, 0, 0, 1, 3'b100, 0, 0, 0, 0, 0, "ANDLW");
    add(XORLW('h5A),               6, 0, 1, 0, 0, 1, 3'b100, 0, 0, 0, 0, 0, "XORLW");
    add(SUBLW('h5A),               3, 0, 1, 0, 0, 1, 3'b111, 0, 0, 0, 0, 0, "SUBLW");
    add(ADDLW('h5A),               2, 0, 1, 0, 0, 1, 3'b111, 0, 0, 0, 0, 0, "ADDLW");
    add(NOP(),                     1, 0, 0, 0, 0, 0, 3'b000, 0, 0, 0, 0, 0, "NOP");

    ir = NOP(); alu_z = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(state == ST_Q1, "reset state is not Q1");

    for (int pass = 0; pass < 4; pass++) begin
      foreach (tbl[i]) begin
        exp_t e;
        bit   skip;
        e = tbl[i];
        ir = e.ir;
        alu_z = 1'(pass % 2);
        skip = (e.skz && alu_z) || (e.sknz && !alu_z);
        if (skip) skips++;
        // Q1
        check(state == ST_Q1 && state == 2'b00, $sformatf("%s: not in Q1", e.name));
        check(ctrl.ir_load && ctrl.pc_inc && !ctrl.alu_en && !ctrl.f_rd && !ctrl.f_wr && !ctrl.w_wr &&
              !ctrl.pc_jump && !ctrl.push && !ctrl.pop, $sformatf("%s: Q1 controls", e.name));
        @(negedge clk);
        // Q2
        check(state == ST_Q2 && state == 2'b01, $sformatf("%s: not in Q2", e.name));
        check(!ctrl.ir_load && !ctrl.pc_inc && ctrl.alu_en && ctrl.f_rd == e.rd && !ctrl.f_wr && !ctrl.w_wr,
              $sformatf("%s: Q2 controls", e.name));
        check(int'(ctrl.alu_op) == e.op && ctrl.a_mask == e.am && ctrl.b_lit == e.bl,
              $sformatf("%s: ALU op %0d am=%0b bl=%0b", e.name, ctrl.alu_op, ctrl.a_mask, ctrl.b_lit));
        @(negedge clk);
        // Q3
        check(state == ST_Q3 && state == 2'b11, $sformatf("%s: not in Q3", e.name));
        check(!ctrl.alu_en && !ctrl.f_rd && ctrl.f_wr == e.wf && ctrl.w_wr == e.ww &&
              ctrl.flags_en == e.fl && !ctrl.pc_inc && !ctrl.pc_jump,
              $sformatf("%s: Q3 controls wf=%0b ww=%0b fl=%b", e.name, ctrl.f_wr, ctrl.w_wr, ctrl.flags_en));
        @(negedge clk);
        // Q4
        check(state == ST_Q4 && state == 2'b10, $sformatf("%s: not in Q4", e.name));
        check(ctrl.pc_inc == skip && ctrl.pc_jump == e.jump && ctrl.push == e.push && ctrl.pop == e.pop &&
              !ctrl.f_wr && !ctrl.w_wr && ctrl.flags_en == 3'b000,
              $sformatf("%s: Q4 controls inc=%0b jump=%0b push=%0b pop=%0b", e.name,
                        ctrl.pc_inc, ctrl.pc_jump, ctrl.push, ctrl.pop));
        @(negedge clk);
      end
    end
    check(skips > 0, "no skip taken");

    // SLEEP: PD clear in Q3, then the clock stops until ext_int
    ir = SLEEP();
    @(negedge clk); @(negedge clk);
    check(ctrl.pd_clr, "SLEEP: pd_clr not raised in Q3");
    @(negedge clk); @(negedge clk);
    check(sleeping && state == ST_Q1, "SLEEP: not sleeping in Q1");
    begin
      int g0;
      g0 = gcount;
      repeat (10) @(negedge clk);
      check(gcount == g0 && state == ST_Q1, "SLEEP: gated clock still running");
      ir = NOP();
      ext_int = 1'b1;
      @(negedge clk);
      ext_int = 1'b0;
      check(!sleeping, "wake-up: still sleeping");
      repeat (4) @(negedge clk);
      check(gcount - g0 == 4 && state == ST_Q1, "wake-up: clock not running again");
    end
    ir = CLRWDT();
    @(negedge clk); @(negedge clk);
    check(ctrl.wdt_clr && !ctrl.pd_clr, "CLRWDT: wdt_clr not raised in Q3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
