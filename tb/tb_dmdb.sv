// tb_dmdb: self-checking testbench for dmdb.
//
// Random file addresses, bank bits, FSR values and strobes are applied and
// every output is compared with a reference decoder written here: the data
// address ({RP1,RP0,f} direct, {IRP,FSR} for f = 0), the RAM strobes (only
// for addresses outside the core's registers), the register write enables
// and the read mux (literal, core register, 0 for INDF through FSR = 0, or
// RAM data). Direct, indirect, literal and register cases are counted and
// must all occur.
module tb_dmdb;
  logic [6:0] f;
  logic [2:0] bank;
  logic [7:0] fsr, pcl, status, mem_in, literal, dmdb_in;
  logic [4:0] pclath;
  logic       b_lit, rd, wr;
  logic [8:0] dmab;
  logic       rd_n, wr_n, status_we, fsr_we, pclath_we, pcl_we;
  int checks = 0, failures = 0;
  int n_ind = 0, n_reg = 0, n_ram = 0, n_lit = 0;

  dmdb dut (.f(f), .bank(bank), .fsr(fsr), .pcl(pcl), .status(status), .pclath(pclath),
            .mem_in(mem_in), .literal(literal), .b_lit(b_lit), .rd(rd), .wr(wr),
            .dmab(dmab), .rd_n(rd_n), .wr_n(wr_n), .dmdb_in(dmdb_in),
            .status_we(status_we), .fsr_we(fsr_we), .pclath_we(pclath_we), .pcl_we(pcl_we));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ea, lo;
      bit internal;
      logic [7:0] exp_d;
      f = (i % 5 == 0) ? 7'h00 : (i % 7 == 0) ? 7'($urandom_range(0, 11)) : 7'($urandom());
      bank = 3'($urandom()); pcl = 8'($urandom()); status = 8'($urandom());
      pclath = 5'($urandom()); mem_in = 8'($urandom()); literal = 8'($urandom());
      fsr = (i % 11 == 0) ? {1'($urandom()), 7'($urandom_range(0, 4))} : 8'($urandom());
      b_lit = ($urandom_range(0, 3) == 0);
      rd = 1'($urandom()); wr = 1'($urandom());
      #1;
      ea = (f == 0) ? (int'(bank[2]) * 256 + int'(fsr)) : (int'(bank[1:0]) * 128 + int'(f));
      lo = ea % 128;
      internal = (lo == 0 || lo == 2 || lo == 3 || lo == 4 || lo == 10);
      if (f == 0) n_ind++;
      if (internal) n_reg++; else n_ram++;
      if (b_lit) n_lit++;
      case (lo)
        0: exp_d = 8'h00;
        2: exp_d = pcl;
        3: exp_d = status;
        4: exp_d = fsr;
        10: exp_d = {3'b0, pclath};
        default: exp_d = mem_in;
      endcase
      if (b_lit) exp_d = literal;
      checks++;
      if (dmab !== 9'(ea) || rd_n !== !(rd && !internal) || wr_n !== !(wr && !internal) ||
          pcl_we !== (wr && lo == 2) || status_we !== (wr && lo == 3) ||
          fsr_we !== (wr && lo == 4) || pclath_we !== (wr && lo == 10) || dmdb_in !== exp_d) begin
        failures++;
        $display("FAIL f=%h bank=%b fsr=%h dmab=%h (exp %h) rd_n=%b wr_n=%b dmdb_in=%h (exp %h)",
                 f, bank, fsr, dmab, ea[8:0], rd_n, wr_n, dmdb_in, exp_d);
      end
    end
    checks++;
    if (n_ind == 0 || n_reg == 0 || n_ram == 0 || n_lit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
