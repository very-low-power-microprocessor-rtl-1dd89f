// tb_operation_block: self-checking testbench for operation_block.
//
// The testbench plays the Control Block: it fetches instruction words into
// the IR and drives the control word clock by clock, then checks the
// datapath's visible results against values worked out by hand: W,
// STATUS, the program address, the data address and strobes, the bytes
// written into a RAM model. Covered: fetch and PC increment, literal and
// file operations through the ALU with the carry and zero flags, RAM
// reads and writes, the in-core registers (FSR, PCLATH, STATUS, PCL) that
// must not reach the RAM strobes, indirect addressing through INDF with
// IRP, bank selection with RP0, the Mask on a bit set, GOTO with PCLATH,
// CALL/RETURN through the STACK, a computed jump by writing PCL, and PD
// cleared by SLEEP.
module tb_operation_block;
  import mcu_pkg::*;
  import asm14_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  ctrl_t       ctrl;
  logic [12:0] pmab;
  logic [13:0] pmdb_in, pmdb;
  logic [8:0]  dmab;
  logic [7:0]  dmdb_in_mem, dmdb_out, dbg_w, dbg_status;
  logic        rd_n, wr_n, alu_z;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  operation_block #(.STACK_DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .pmab(pmab), .pmdb_in(pmdb_in), .dmab(dmab),
    .dmdb_in_mem(dmdb_in_mem), .dmdb_out(dmdb_out), .rd_n(rd_n), .wr_n(wr_n), .pmdb(pmdb),
    .alu_z(alu_z), .dbg_w(dbg_w), .dbg_status(dbg_status));

  data_ram_model u_ram (.clk(clk), .addr(dmab), .wr_n(wr_n), .d(dmdb_out), .q(dmdb_in_mem));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rd_n) n_rd++;
    if (!wr_n) n_wr++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // apply one control word for one clock
  task automatic tick(input ctrl_t c);
    ctrl = c;
    @(posedge clk);
    @(negedge clk);
    ctrl = CTRL_IDLE;
  endtask

  task automatic fetch(input logic [13:0] w);
    ctrl_t c;
    c = CTRL_IDLE;
    pmdb_in = w;
    c.ir_load = 1'b1;
    c.pc_inc  = 1'b1;
    tick(c);
  endtask

  // ALU input load (Q2) followed by write back (Q3)
  task automatic exec(input alu_op_t op, input bit a_mask, input bit b_lit, input bit rd,
                      input bit to_w, input bit to_f, input flags_t fl);
    ctrl_t c;
    c = CTRL_IDLE;
    c.alu_op = op; c.a_mask = a_mask; c.b_lit = b_lit; c.f_rd = rd; c.alu_en = 1'b1;
    tick(c);
    c.alu_en = 1'b0; c.f_rd = 1'b0;
    c.w_wr = to_w; c.f_wr = to_f; c.flags_en = fl;
    tick(c);
  endtask

  localparam flags_t NOFL = '{z: 1'b0, dc: 1'b0, c: 1'b0};
  localparam flags_t ALLFL = '{z: 1'b1, dc: 1'b1, c: 1'b1};
  localparam flags_t ZFL = '{z: 1'b1, dc: 1'b0, c: 1'b0};

  initial begin
    ctrl = CTRL_IDLE;
    pmdb_in = '0;
    #12;
    check(pmab == 0 && dbg_w == 0 && dbg_status == 8'h18, "reset values");
    rst_n = 1'b1;
    @(negedge clk);

    // MOVLW 0x3C
    fetch(MOVLW('h3C));
    check(pmdb == MOVLW('h3C) && pmab == 1, "fetch: IR or PC");
    exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    check(dbg_w == 8'h3C, $sformatf("MOVLW: W=%h", dbg_w));

    // MOVWF 0x21: RAM write at 0x021
    fetch(MOVWF('h21));
    begin
      ctrl_t c;
      c = CTRL_IDLE; c.alu_op = ALU_PASSA; c.alu_en = 1'b1;
      tick(c);
      c = CTRL_IDLE; c.alu_op = ALU_PASSA; c.f_wr = 1'b1;
      ctrl = c;
      #1;
      check(!wr_n && dmab == 9'h021 && dmdb_out == 8'h3C, "MOVWF: RAM write strobe/address/data");
      @(posedge clk); @(negedge clk);
      ctrl = CTRL_IDLE;
    end
    check(u_ram.mem['h21] == 8'h3C, "MOVWF: RAM not written");

    // ADDWF 0x21,W: 0x3C + 0x3C = 0x78, no carry
    fetch(ADDWF('h21, TO_W));
    exec(ALU_ADD, 0, 0, 1, 1, 0, ALLFL);
    check(dbg_w == 8'h78 && dbg_status[2:0] == 3'b010, $sformatf("ADDWF: W=%h ST=%h", dbg_w, dbg_status));
    // ADDLW 0x90: 0x78 + 0x90 = 0x108 -> 0x08, C = 1, DC = 1
    fetch(ADDLW('h90));
    exec(ALU_ADD, 0, 1, 0, 1, 0, ALLFL);
    check(dbg_w == 8'h08 && dbg_status[0] == 1'b1 && dbg_status[2] == 1'b0,
          $sformatf("ADDLW: W=%h ST=%h", dbg_w, dbg_status));
    // SUBLW 0x08: 8 - 8 = 0, Z = 1, C = 1
    fetch(SUBLW('h08));
    exec(ALU_SUB, 0, 1, 0, 1, 0, ALLFL);
    check(dbg_w == 8'h00 && dbg_status[2] && dbg_status[0] && alu_z, "SUBLW: zero result");

    // MOVLW 0x45 ; MOVWF FSR: in-core register, RAM strobe stays high
    fetch(MOVLW('h45)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(FSR));
    begin
      int w0;
      w0 = n_wr;
      exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
      check(n_wr == w0, "MOVWF FSR reached the RAM");
    end
    // MOVLW 0x77 ; MOVWF INDF -> RAM 0x045
    fetch(MOVLW('h77)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(INDF)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    check(u_ram.mem['h045] == 8'h77, "indirect write to 0x045");
    // STATUS <- 0x98 (IRP = 1, TO = PD = 1 kept read-only): indirect now 0x145
    fetch(MOVLW('h80)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(STATUS)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    check(dbg_status == 8'h98, $sformatf("STATUS write: %h", dbg_status));
    fetch(MOVWF(INDF)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    check(u_ram.mem['h145] == 8'h80, "indirect write with IRP to 0x145");
    // RP0 = 1: direct 0x21 goes to 0x0A1
    fetch(MOVLW('h20)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(STATUS)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    fetch(MOVWF('h21)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    check(u_ram.mem['h0A1] == 8'h20 && u_ram.mem['h021] == 8'h3C, "bank 1 write to 0x0A1");
    fetch(CLRF(STATUS)); exec(ALU_CLR, 0, 0, 0, 0, 1, ZFL);
    // BSF 0x21,7 : 0x3C -> 0xBC
    fetch(BSF('h21, 7)); exec(ALU_IOR, 1, 0, 1, 0, 1, NOFL);
    check(u_ram.mem['h021] == 8'hBC, $sformatf("BSF: %h", u_ram.mem['h021]));
    // BCF 0x21,2 : 0xBC -> 0xB8
    fetch(BCF('h21, 2)); exec(ALU_AND, 1, 0, 1, 0, 1, NOFL);
    check(u_ram.mem['h021] == 8'hB8, $sformatf("BCF: %h", u_ram.mem['h021]));

    // PCLATH <- 0x18, GOTO 0x155 -> 0x1955
    fetch(MOVLW('h18)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(PCLATH)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    fetch(GOTO('h155));
    begin
      ctrl_t c;
      c = CTRL_IDLE; c.pc_jump = 1'b1;
      tick(c);
    end
    check(pmab == 13'h1955, $sformatf("GOTO with PCLATH: pmab=%h", pmab));
    // CALL 0x010 (return address 0x1956), RETURN
    fetch(CALL('h010));
    begin
      ctrl_t c;
      c = CTRL_IDLE; c.pc_jump = 1'b1; c.push = 1'b1;
      tick(c);
      check(pmab == 13'h1810, $sformatf("CALL: pmab=%h", pmab));
      fetch(RETURN());
      c = CTRL_IDLE; c.pop = 1'b1;
      tick(c);
      check(pmab == 13'h1956, $sformatf("RETURN: pmab=%h", pmab));
    end
    // computed jump: W = 0x42, MOVWF PCL -> PC = {PCLATH, 0x42} = 0x1842
    fetch(MOVLW('h42)); exec(ALU_PASSB, 0, 1, 0, 1, 0, NOFL);
    fetch(MOVWF(PCL)); exec(ALU_PASSA, 0, 0, 0, 0, 1, NOFL);
    check(pmab == 13'h1842, $sformatf("PCL write: pmab=%h", pmab));
    // MOVF PCL,W reads the low byte of the already incremented PC
    fetch(MOVF(PCL, TO_W)); exec(ALU_PASSB, 0, 0, 1, 1, 0, ZFL);
    check(dbg_w == 8'h43, $sformatf("PCL read: W=%h", dbg_w));
    // SLEEP clears PD
    fetch(SLEEP());
    begin
      ctrl_t c;
      c = CTRL_IDLE; c.pd_clr = 1'b1;
      tick(c);
    end
    check(dbg_status[4:3] == 2'b10, $sformatf("SLEEP: TO/PD=%b", dbg_status[4:3]));
    check(n_rd > 0 && n_wr > 0, "RAM strobes never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
