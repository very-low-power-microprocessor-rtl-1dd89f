// operation_block: the Operation Block (datapath).
//
// Holds the core's registers and data paths, wired as in the datapath
// drawing: the IR drives the internal pmdb bus; the ALU takes W or the
// Mask on input A and the DMDB's dmdb_in bus (file register, RAM or
// literal) on input B; its result dmdb_out goes to W, STATUS, FSR, PCLatH,
// the PC (PCL writes) and the RAM. The PC addresses the program memory and
// exchanges return addresses with the STACK. STATUS bits 7..5 select the
// data bank in the DMDB and STATUS.C is the ALU carry input. Every register
// is clocked by the gated core clock clk and acts on the control word ctrl
// from the Control Block; ALU Z goes back to it for skips.
module operation_block
  import mcu_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  // program memory
  output logic [12:0] pmab,
  input  logic [13:0] pmdb_in,
  // data memory
  output logic [8:0]  dmab,
  input  logic [7:0]  dmdb_in_mem,
  output logic [7:0]  dmdb_out,
  output logic        rd_n,
  output logic        wr_n,
  // to the Control Block
  output logic [13:0] pmdb,
  output logic        alu_z,
  // observability
  output logic [7:0]  dbg_w,
  output logic [7:0]  dbg_status
);

  logic [12:0] pc, stack_top;
  logic [7:0]  w, mask, status, fsr, dmdb_in, alu_a;
  logic [4:0]  pclath;
  logic        alu_dc, alu_c;
  logic        status_we, fsr_we, pclath_we, pcl_we;

  ir_reg #(.IW(14)) u_ir (
    .clk(clk), .rst_n(rst_n), .load(ctrl.ir_load), .pmdb_in(pmdb_in), .pmdb(pmdb)
  );

  pc_unit #(.PCW(13)) u_pc (
    .clk(clk), .rst_n(rst_n), .inc(ctrl.pc_inc), .jump(ctrl.pc_jump), .ret(ctrl.pop),
    .pcl_wr(pcl_we), .k(pmdb[10:0]), .pclath(pclath), .data(dmdb_out),
    .stack_top(stack_top), .pc(pc)
  );

  hw_stack #(.DEPTH(STACK_DEPTH), .PCW(13)) u_stack (
    .clk(clk), .rst_n(rst_n), .push(ctrl.push), .pop(ctrl.pop), .din(pc), .top(stack_top)
  );

  w_reg #(.DW(8)) u_w (
    .clk(clk), .rst_n(rst_n), .we(ctrl.w_wr), .d(dmdb_out), .q(w)
  );

  bit_mask u_mask (
    .sel(pmdb[11:7]), .mask(mask)
  );

  assign alu_a = ctrl.a_mask ? mask : w;

  alu u_alu (
    .clk(clk), .rst_n(rst_n), .en(ctrl.alu_en), .a(alu_a), .b(dmdb_in), .op(ctrl.alu_op),
    .cin(status[ST_C]), .y(dmdb_out), .z(alu_z), .dc(alu_dc), .c(alu_c)
  );

  status_reg u_status (
    .clk(clk), .rst_n(rst_n), .flags_en(ctrl.flags_en),
    .flags('{z: alu_z, dc: alu_dc, c: alu_c}), .we(status_we), .d(dmdb_out),
    .pd_clr(ctrl.pd_clr), .wdt_clr(ctrl.wdt_clr), .q(status)
  );

  fsr_reg #(.DW(8)) u_fsr (
    .clk(clk), .rst_n(rst_n), .we(fsr_we), .d(dmdb_out), .q(fsr)
  );

  pclath_reg #(.W(5)) u_pclath (
    .clk(clk), .rst_n(rst_n), .we(pclath_we), .d(dmdb_out[4:0]), .q(pclath)
  );

  dmdb u_dmdb (
    .f(pmdb[6:0]), .bank(status[ST_IRP:ST_RP0]), .fsr(fsr), .pcl(pc[7:0]), .status(status),
    .pclath(pclath), .mem_in(dmdb_in_mem), .literal(pmdb[7:0]), .b_lit(ctrl.b_lit),
    .rd(ctrl.f_rd), .wr(ctrl.f_wr), .dmab(dmab), .rd_n(rd_n), .wr_n(wr_n), .dmdb_in(dmdb_in),
    .status_we(status_we), .fsr_we(fsr_we), .pclath_we(pclath_we), .pcl_we(pcl_we)
  );

  assign pmab       = pc;
  assign dbg_w      = w;
  assign dbg_status = status;

endmodule
