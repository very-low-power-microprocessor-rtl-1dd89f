// tb_mcu_core: end-to-end testbench for the microprocessor cell, run with
// every parameter at its default.
//
// The core runs from a program ROM array (8K x 14) and the data RAM model
// (512 x 8). Next to it runs an instruction-level reference model of the
// instruction set written here, independent of the RTL. After every
// instruction the core completes (the control state goes from Q4 back to
// Q1) the reference executes the same instruction and W, STATUS and the PC
// are compared; at the end of each program the whole RAM is compared. The
// number of clocks the core was awake for each instruction must be four.
//
// Programs:
//   1. bubble sort of 16 bytes through FSR/INDF, with a swap subroutine
//      (CALL/RETURN), ended by SLEEP; the result must be sorted;
//   2. a two-tap low-pass filter y[n] = (x[n] + x[n-1]) / 2 over 24
//      samples, output in the upper RAM bank through IRP, ended by SLEEP;
//   3. a look-up table read with computed jumps (ADDWF PCL / RETLW) under
//      PCLATH, nested calls filling the STACK, SLEEP, wake-up;
//   4. random instruction streams filling the whole ROM (no returns),
//      with SLEEP instructions, random wake-up interrupts and STACK
//      overflows (calls deeper than the 8 entries).
// Each mechanism (skip, GOTO, CALL, RETURN, RETLW, PCL write, indirect
// access, bank switching, carry, SLEEP and wake-up, STACK overflow) is
// counted; one that never happens counts as a failure.
module tb_mcu_core;
  import asm14_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ext_int = 1'b0;
  logic [12:0] pmab;
  logic [13:0] pmdb_in;
  logic [8:0]  dmab;
  logic [7:0]  dmdb_in_mem, dmdb_out;
  logic        rd_n, wr_n, sleeping;
  logic [7:0]  dbg_w, dbg_status;
  logic [12:0] dbg_pc;
  logic [1:0]  dbg_state;

  logic [13:0] rom [8192];

  mcu_core dut (
    .clk(clk), .rst_n(rst_n), .ext_int(ext_int), .pmab(pmab), .pmdb_in(pmdb_in),
    .dmab(dmab), .dmdb_in_mem(dmdb_in_mem), .dmdb_out(dmdb_out), .rd_n(rd_n), .wr_n(wr_n),
    .sleeping(sleeping), .dbg_w(dbg_w), .dbg_status(dbg_status), .dbg_pc(dbg_pc),
    .dbg_state(dbg_state));

  data_ram_model u_ram (.clk(clk), .addr(dmab), .wr_n(wr_n), .d(dmdb_out), .q(dmdb_in_mem));

  assign pmdb_in = rom[pmab];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_skip = 0, n_goto = 0, n_call = 0, n_ret = 0, n_retlw = 0, n_pclwr = 0;
  int n_ind = 0, n_bank = 0, n_carry = 0, n_sleep = 0, n_wake = 0, n_ovf = 0, n_instr = 0;
  int max_fail_print = 20;

  task automatic fail(input string msg);
    failures++;
    if (max_fail_print > 0) begin
      max_fail_print--;
      $display("FAIL %s", msg);
    end
    if (failures >= 20) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  // ------------------------------------------------------ reference model
  logic [7:0]  r_ram [512];
  logic [7:0]  r_w, r_status, r_fsr;
  logic [4:0]  r_pclath;
  logic [12:0] r_pc;
  logic [12:0] r_stack [8];
  int          r_depth;

  function automatic int r_ea(input int f);
    return (f == 0) ? (int'(r_status[7]) * 256 + int'(r_fsr)) : (int'(r_status[6:5]) * 128 + f);
  endfunction

  function automatic logic [7:0] r_read(input int f);
    int a;
    a = r_ea(f);
    if (f == 0) n_ind++;
    if (a >= 128) n_bank++;
    case (a % 128)
      0: return 8'h00;
      2: return r_pc[7:0];
      3: return r_status;
      4: return r_fsr;
      10: return {3'b000, r_pclath};
      default: return r_ram[a];
    endcase
  endfunction

  function automatic void r_write(input int f, input logic [7:0] v);
    int a;
    a = r_ea(f);
    if (f == 0) n_ind++;
    if (a >= 128) n_bank++;
    case (a % 128)
      0: ;
      2: begin r_pc = {r_pclath, v}; n_pclwr++; end
      3: begin r_status[7:5] = v[7:5]; r_status[2:0] = v[2:0]; end
      4: r_fsr = v;
      10: r_pclath = v[4:0];
      default: r_ram[a] = v;
    endcase
  endfunction

  function automatic void r_push(input logic [12:0] v);
    for (int i = 7; i > 0; i--) r_stack[i] = r_stack[i-1];
    r_stack[0] = v;
    r_depth++;
    if (r_depth > 8) n_ovf++;
  endfunction

  function automatic logic [12:0] r_pop();
    logic [12:0] t;
    t = r_stack[0];
    for (int i = 0; i < 7; i++) r_stack[i] = r_stack[i+1];
    r_depth--;
    return t;
  endfunction

  function automatic void r_reset();
    r_w = 0; r_status = 8'h18; r_fsr = 0; r_pclath = 0; r_pc = 0; r_depth = 0;
    for (int i = 0; i < 512; i++) r_ram[i] = 0;
    for (int i = 0; i < 8; i++) r_stack[i] = 0;
  endfunction

  // executes one instruction; returns 1 for SLEEP
  function automatic bit r_step();
    logic [13:0] ir;
    logic [7:0]  a, res, k;
    int          f, b;
    bit          d, skip, is_sleep;
    ir = rom[r_pc];
    r_pc = r_pc + 13'd1;
    f = int'(ir[6:0]);
    d = ir[7];
    k = ir[7:0];
    skip = 0;
    is_sleep = 0;
    n_instr++;
    case (ir[13:12])
      2'b00: begin
        if (ir[11:8] == 4'h0) begin
          if (d) r_write(f, r_w);
          else if (ir[6:0] == 7'h08 || ir[6:0] == 7'h09) begin r_pc = r_pop(); n_ret++; end
          else if (ir[6:0] == 7'h63) begin r_status[4:3] = 2'b10; is_sleep = 1; end
          else if (ir[6:0] == 7'h64) r_status[4:3] = 2'b11;
        end else begin
          logic zf, cf, dcf;
          bit fz, fc, fdc;
          fz = 0; fc = 0; fdc = 0; cf = 0; dcf = 0;
          a = (ir[11:8] == 4'h1) ? 8'h00 : r_read(f);
          case (ir[11:8])
            4'h1: begin res = 0; fz = 1; end
            4'h2: begin res = a - r_w; cf = (a >= r_w); dcf = (a[3:0] >= r_w[3:0]); fz = 1; fc = 1; fdc = 1; end
            4'h3: begin res = a - 1; fz = 1; end
            4'h4: begin res = a | r_w; fz = 1; end
            4'h5: begin res = a & r_w; fz = 1; end
            4'h6: begin res = a ^ r_w; fz = 1; end
            4'h7: begin res = a + r_w; cf = (int'(a) + int'(r_w)) > 255;
                        dcf = (int'(a[3:0]) + int'(r_w[3:0])) > 15; fz = 1; fc = 1; fdc = 1; end
            4'h8: begin res = a; fz = 1; end
            4'h9: begin res = ~a; fz = 1; end
            4'hA: begin res = a + 1; fz = 1; end
            4'hB: begin res = a - 1; skip = (res == 0); end
            4'hC: begin res = {r_status[0], a[7:1]}; cf = a[0]; fc = 1; end
            4'hD: begin res = {a[6:0], r_status[0]}; cf = a[7]; fc = 1; end
            4'hE: res = {a[3:0], a[7:4]};
            default: begin res = a + 1; skip = (res == 0); end
          endcase
          if (d) r_write(f, res); else r_w = res;
          zf = (res == 0);
          if (fz) r_status[2] = zf;
          if (fdc) r_status[1] = dcf;
          if (fc) begin r_status[0] = cf; if (cf) n_carry++; end
        end
      end
      2'b01: begin
        a = r_read(f);
        b = int'(ir[9:7]);
        case (ir[11:10])
          2'b00: r_write(f, a & ~(8'h01 << b));
          2'b01: r_write(f, a | (8'h01 << b));
          2'b10: skip = (a[b] == 1'b0);
          default: skip = (a[b] == 1'b1);
        endcase
      end
      2'b10: begin
        if (!ir[11]) begin r_push(r_pc); n_call++; end else n_goto++;
        r_pc = {r_pclath[4:3], ir[10:0]};
      end
      default: begin
        casez (ir[11:8])
          4'b00??: r_w = k;
          4'b01??: begin r_w = k; r_pc = r_pop(); n_retlw++; end
          4'b1000: begin r_w = r_w | k; r_status[2] = (r_w == 0); end
          4'b1001: begin r_w = r_w & k; r_status[2] = (r_w == 0); end
          4'b1010: begin r_w = r_w ^ k; r_status[2] = (r_w == 0); end
          4'b110?: begin
            r_status[0] = (k >= r_w); r_status[1] = (k[3:0] >= r_w[3:0]);
            if (k >= r_w) n_carry++;
            r_w = k - r_w; r_status[2] = (r_w == 0);
          end
          4'b111?: begin
            r_status[0] = (int'(k) + int'(r_w)) > 255;
            r_status[1] = (int'(k[3:0]) + int'(r_w[3:0])) > 15;
            if (r_status[0]) n_carry++;
            r_w = k + r_w; r_status[2] = (r_w == 0);
          end
          default: ;
        endcase
      end
    endcase
    if (skip) begin r_pc = r_pc + 13'd1; n_skip++; end
    return is_sleep;
  endfunction

  // ------------------------------------------------------- lockstep check
  bit   running = 0;
  int   executed = 0;
  int   awake_clks = 0;
  logic [1:0] prev_state = 2'b00;

  always @(negedge clk) begin
    if (running) begin
      if (prev_state == 2'b10 && dbg_state == 2'b00) begin
        bit s;
        s = r_step();
        executed++;
        checks++;
        if (awake_clks != 4) fail($sformatf("instruction at %h took %0d clocks", r_pc, awake_clks));
        if (dbg_pc !== r_pc || dbg_w !== r_w || dbg_status !== r_status) begin
          fail($sformatf("after %0d instr: pc=%h w=%h st=%h, expected pc=%h w=%h st=%h",
                         executed, dbg_pc, dbg_w, dbg_status, r_pc, r_w, r_status));
        end
        if (s) begin
          checks++;
          if (!sleeping && !ext_int) fail("SLEEP did not stop the clock");
          else if (sleeping) n_sleep++;
        end
        awake_clks = 0;
      end
      if (!sleeping) awake_clks++;
    end
    prev_state = dbg_state;
  end

  // random wake-up interrupts
  bit rand_int = 0;
  int asleep_for = 0;
  always @(negedge clk) begin
    ext_int <= 1'b0;
    if (sleeping) begin
      asleep_for++;
      if (asleep_for > 6) begin ext_int <= 1'b1; asleep_for = 0; n_wake++; end
    end else begin
      asleep_for = 0;
      if (rand_int && $urandom_range(0, 199) == 0) ext_int <= 1'b1;
    end
  end

  // --------------------------------------------------------- program load
  int pc_asm;
  task automatic emit(input logic [13:0] w);
    rom[pc_asm] = w;
    pc_asm++;
  endtask

  task automatic start_program();
    running = 0;
    rst_n = 1'b0;
    r_reset();
    for (int i = 0; i < 512; i++) u_ram.mem[i] = 8'h00;
    repeat (2) @(posedge clk);
    @(negedge clk);
    prev_state = 2'b00;
    awake_clks = 0;
    executed = 0;
    rst_n = 1'b1;
    running = 1;
  endtask

  // run until n instructions executed, or until the core sleeps (stop_on_sleep)
  task automatic run(input int n, input bit stop_on_sleep);
    int guard;
    guard = 0;
    while (executed < n && guard < 40 * n + 100) begin
      @(posedge clk);
      guard++;
      if (stop_on_sleep && sleeping) break;
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (guard >= 40 * n + 100) fail("program did not finish");
  endtask

  task automatic compare_ram(input string what);
    int bad;
    bad = 0;
    for (int i = 0; i < 512; i++) if (u_ram.mem[i] !== r_ram[i]) bad++;
    checks++;
    if (bad != 0) fail($sformatf("%s: %0d RAM bytes differ from the reference", what, bad));
  endtask

  // ------------------------------------------------------------- programs
  localparam int N_SORT = 16, ARR = 'h30, CNT = 'h22, SWP = 'h23, TMP = 'h24, TMP2 = 'h25;

  task automatic load_sort();
    int outer, inner, noswap, swap_sub, p1, p2;
    for (int i = 0; i < 8192; i++) rom[i] = NOP();
    // data initialised by the program itself: ARR[i] = (i * 37 + 11) mod 256
    pc_asm = 0;
    for (int i = 0; i < N_SORT; i++) begin
      emit(MOVLW((i * 37 + 11) % 256)); emit(MOVWF(ARR + i));
    end
    outer = pc_asm;
    emit(MOVLW(N_SORT - 1)); emit(MOVWF(CNT)); emit(CLRF(SWP));
    emit(MOVLW(ARR)); emit(MOVWF(FSR));
    inner = pc_asm;
    emit(MOVF(INDF, TO_W)); emit(MOVWF(TMP)); emit(INCF(FSR, TO_F));
    emit(MOVF(INDF, TO_W));           // W = b
    emit(SUBWF(TMP, TO_W));           // a - b: C = 1 when a >= b
    emit(BTFSC(STATUS, Z));
    p1 = pc_asm; emit(NOP());         // GOTO noswap
    emit(BTFSS(STATUS, C));
    p2 = pc_asm; emit(NOP());         // GOTO noswap
    swap_sub = 'h200;
    emit(CALL(swap_sub));
    emit(BSF(SWP, 0));
    noswap = pc_asm;
    rom[p1] = GOTO(noswap); rom[p2] = GOTO(noswap);
    emit(DECFSZ(CNT, TO_F)); emit(GOTO(inner));
    emit(BTFSC(SWP, 0)); emit(GOTO(outer));
    emit(SLEEP());
    emit(GOTO(pc_asm - 1));
    // swap: mem[FSR-1] <-> mem[FSR], TMP holds mem[FSR-1]
    pc_asm = swap_sub;
    emit(MOVF(INDF, TO_W)); emit(MOVWF(TMP2)); emit(MOVF(TMP, TO_W)); emit(MOVWF(INDF));
    emit(DECF(FSR, TO_F)); emit(MOVF(TMP2, TO_W)); emit(MOVWF(INDF)); emit(INCF(FSR, TO_F));
    emit(RETURN());
  endtask

  localparam int N_FILT = 24, XB = 'h40, YB = 'h120, PREV = 'h26, IDX = 'h27;

  task automatic load_filter();
    int loop;
    for (int i = 0; i < 8192; i++) rom[i] = NOP();
    pc_asm = 0;
    // samples: a noisy ramp, x[i] = (i * 29 + (i % 3) * 100) mod 256
    for (int i = 0; i < N_FILT; i++) begin
      emit(MOVLW((i * 29 + (i % 3) * 100) % 256)); emit(MOVWF(XB + i));
    end
    emit(MOVF(XB, TO_W)); emit(MOVWF(PREV));
    emit(MOVLW(N_FILT - 1)); emit(MOVWF(CNT));
    emit(MOVLW(XB + 1)); emit(MOVWF(IDX));
    loop = pc_asm;
    emit(BCF(STATUS, IRP));
    emit(MOVF(IDX, TO_W)); emit(MOVWF(FSR));
    emit(MOVF(INDF, TO_W));           // W = x[n]
    emit(MOVWF(TMP));
    emit(ADDWF(PREV, TO_W));          // W = x[n] + x[n-1], C = bit 8
    emit(MOVWF(TMP2));
    emit(RRF(TMP2, TO_F));            // (C:sum) >> 1
    emit(MOVF(TMP, TO_W)); emit(MOVWF(PREV));
    emit(MOVF(IDX, TO_W)); emit(ADDLW(YB % 256 - XB)); emit(MOVWF(FSR));
    emit(BSF(STATUS, IRP));           // y lives in the upper bank
    emit(MOVF(TMP2, TO_W)); emit(MOVWF(INDF));
    emit(INCF(IDX, TO_F));
    emit(DECFSZ(CNT, TO_F)); emit(GOTO(loop));
    emit(SLEEP());
    emit(GOTO(pc_asm - 1));
  endtask

  localparam int TBL = 'h0300, RES = 'h50, DEPTH_CALLS = 8;

  task automatic load_table();
    int loop;
    for (int i = 0; i < 8192; i++) rom[i] = NOP();
    pc_asm = 0;
    // squares of 0..15 looked up through a RETLW table at 0x300
    emit(CLRF(IDX));
    loop = pc_asm;
    emit(MOVLW(TBL >> 8)); emit(MOVWF(PCLATH));
    emit(MOVF(IDX, TO_W)); emit(CALL('h2F0));
    emit(MOVWF(TMP));
    emit(MOVLW(RES)); emit(ADDWF(IDX, TO_W)); emit(MOVWF(FSR));
    emit(MOVF(TMP, TO_W)); emit(MOVWF(INDF));
    emit(INCF(IDX, TO_F));
    emit(BTFSS(IDX, 4)); emit(GOTO(loop));
    // nested calls DEPTH_CALLS deep (fills the 8-entry STACK), returns
    emit(CLRF(PCLATH));
    emit(CLRF(TMP2));
    emit(CALL('h100));
    emit(SLEEP());
    emit(MOVLW('hA5)); emit(MOVWF('h60));   // runs after the wake-up
    emit(CLRWDT());
    emit(SLEEP());
    emit(GOTO(pc_asm - 1));
    // subroutine chain at 0x100: each level increments TMP2 then calls the next
    pc_asm = 'h100;
    for (int i = 0; i < DEPTH_CALLS; i++) begin
      emit(INCF(TMP2, TO_F));
      if (i < DEPTH_CALLS - 1) emit(CALL(pc_asm + 2));
      emit(RETURN());
    end
    // 0x2F0: table entry: PCL = W + low byte of 0x300
    pc_asm = 'h2F0;
    emit(MOVWF(TMP)); emit(MOVLW(TBL % 256)); emit(ADDWF(TMP, TO_W)); emit(MOVWF(PCL));
    pc_asm = TBL;
    for (int i = 0; i < 16; i++) emit(RETLW(i * i));
  endtask

  task automatic load_random();
    for (int i = 0; i < 8192; i++) begin
      logic [13:0] w;
      int r;
      w = 14'($urandom());
      r = $urandom_range(0, 99);
      if (w[13:12] != 2'b10 && r < 30) w[6:0] = 7'(($urandom_range(0, 4) == 0) ? 0 :
                                                   (($urandom_range(0, 1) != 0) ? 3 : 4));
      if (r == 99) w = SLEEP();
      // no returns: the stack is never popped below what was pushed
      if (w == RETURN() || w == RETFIE() || w[13:10] == 4'b1101) w = NOP();
      rom[i] = w;
    end
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sorted_ok, filt_ok, tbl_ok;
    // 1. bubble sort
    load_sort();
    start_program();
    run(20000, 1);
    compare_ram("sort");
    sorted_ok = 1;
    for (int i = 0; i < N_SORT - 1; i++) if (u_ram.mem[ARR + i] > u_ram.mem[ARR + i + 1]) sorted_ok = 0;
    checks++;
    if (!sorted_ok) fail("array not sorted");
    $display("sort: %0d instructions, %0d calls, %0d skips", executed, n_call, n_skip);

    // 2. low-pass filter
    load_filter();
    start_program();
    run(20000, 1);
    compare_ram("filter");
    filt_ok = 1;
    for (int n = 1; n < N_FILT; n++) begin
      int xn, xp;
      xn = (n * 29 + (n % 3) * 100) % 256;
      xp = ((n - 1) * 29 + ((n - 1) % 3) * 100) % 256;
      if (int'(u_ram.mem[YB + n]) != (xn + xp) / 2) filt_ok = 0;
    end
    checks++;
    if (!filt_ok) fail("filter output wrong");
    $display("filter: %0d instructions", executed);

    // 3. table, nested calls, sleep and wake-up
    load_table();
    start_program();
    run(20000, 1);     // stops at the first SLEEP
    checks++;
    if (!sleeping) fail("core not asleep after SLEEP");
    checks++;
    if (dbg_status[PD] !== 1'b0) fail("PD not cleared by SLEEP");
    run(executed + 5, 0); // the testbench wakes it up
    run(20000, 1);
    compare_ram("table");
    tbl_ok = 1;
    for (int i = 0; i < 16; i++) if (int'(u_ram.mem[RES + i]) != (i * i) % 256) tbl_ok = 0;
    checks++;
    if (!tbl_ok) fail("table results wrong");
    checks++;
    if (u_ram.mem['h60] !== 8'hA5 || u_ram.mem[TMP2] !== 8'(DEPTH_CALLS)) fail("wake-up or call chain result wrong");

    // 4. random programs
    rand_int = 1;
    for (int t = 0; t < 4; t++) begin
      load_random();
      start_program();
      run(6000, 0);
      compare_ram($sformatf("random %0d", t));
    end
    running = 0;

    $display("instr=%0d skip=%0d goto=%0d call=%0d return=%0d retlw=%0d pclwrite=%0d indirect=%0d",
             n_instr, n_skip, n_goto, n_call, n_ret, n_retlw, n_pclwr, n_ind);
    $display("bank>0=%0d carry=%0d sleep=%0d wake=%0d stack_overflow=%0d",
             n_bank, n_carry, n_sleep, n_wake, n_ovf);
    checks++;
    if (n_skip == 0 || n_goto == 0 || n_call == 0 || n_ret == 0 || n_retlw == 0 || n_pclwr == 0 ||
        n_ind == 0 || n_bank == 0 || n_carry == 0 || n_sleep == 0 || n_wake == 0 || n_ovf == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
