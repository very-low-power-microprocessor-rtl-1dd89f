// tb_tictactoe: the core plays Tic-Tac-Toe against the testbench.
//
// The game program runs on mcu_core at its default parameters. The board
// is nine RAM bytes (0 empty, 1 the opponent's mark, 4 the core's), so the
// sum of a line tells its state: 3 or 12 a win, 8 two of the core's marks
// and a gap, 2 two of the opponent's and a gap. The eight lines are read
// from a RETLW table by computed jumps. Each turn the core sleeps; the
// testbench writes the opponent's move into the MOVE byte and wakes it with
// ext_int; the core records it, checks for a win or a draw, then wins if it
// can, else blocks, else takes the first free cell in the order centre,
// corners, edges, writes its cell into OUT and sleeps again. STAT ends as
// 1 (opponent won), 2 (core won) or 3 (draw).
//
// The testbench plays random legal moves and keeps its own model of the
// game written directly in SystemVerilog; after every turn it compares the
// core's move, the whole board and the game status with the model. Games
// won by each side and drawn games are counted and each must occur.
module tb_tictactoe;
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
  int n_owon = 0, n_cwon = 0, n_draw = 0, n_turns = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ RAM map
  localparam int BOARD = 'h30, MOVE = 'h20, OUT = 'h21, STAT = 'h22, MOVES = 'h23,
                 TGT = 'h24, LI = 'h25, LN = 'h26, BASE = 'h27, SUM = 'h28,
                 C0 = 'h29, C1 = 'h2A, C2 = 'h2B, K = 'h2C;

  // ------------------------------------------------------ two-pass assembler
  int pc_asm;
  int labels [string];

  function automatic int L(input string name);
    return labels.exists(name) ? labels[name] : 0;
  endfunction

  task automatic at(input string name);
    labels[name] = pc_asm;
  endtask

  task automatic emit(input logic [13:0] w);
    rom[pc_asm] = w;
    pc_asm++;
  endtask

  // line, with f = C0/C1/C2: load the cell address and test it for empty
  task automatic test_cell(input int c, input string target);
    emit(MOVF(c, TO_W)); emit(MOVWF(FSR)); emit(MOVF(INDF, TO_F));
    emit(BTFSC(STATUS, Z)); emit(GOTO(L(target)));
  endtask

  task automatic find(input int t, input string found);
    emit(MOVLW(t)); emit(MOVWF(TGT)); emit(CALL(L("findsum")));
    emit(IORLW(0)); emit(BTFSS(STATUS, Z)); emit(GOTO(L(found)));
  endtask

  task automatic assemble();
    for (int i = 0; i < 8192; i++) rom[i] = NOP();
    pc_asm = 0;
    emit(MOVLW(3)); emit(MOVWF(PCLATH));               // tables live at 0x300
    for (int i = 0; i < 9; i++) emit(CLRF(BOARD + i));
    emit(CLRF(MOVES)); emit(CLRF(STAT)); emit(CLRF(OUT));
    at("turn");
    emit(SLEEP());                                     // wait for the opponent
    emit(MOVF(MOVE, TO_W)); emit(ADDLW(BOARD)); emit(MOVWF(FSR));
    emit(MOVLW(1)); emit(MOVWF(INDF)); emit(INCF(MOVES, TO_F));
    find(3, "owon");
    emit(MOVF(MOVES, TO_W)); emit(XORLW(9)); emit(BTFSC(STATUS, Z)); emit(GOTO(L("draw")));
    find(8, "fill");                                   // win
    find(2, "fill");                                   // block
    emit(CLRF(K));
    at("pref");
    emit(MOVF(K, TO_W)); emit(CALL(L("ptab"))); emit(ADDLW(BOARD)); emit(MOVWF(FSR));
    emit(MOVF(INDF, TO_F)); emit(BTFSC(STATUS, Z)); emit(GOTO(L("put")));
    emit(INCF(K, TO_F)); emit(GOTO(L("pref")));
    at("fill");
    test_cell(C0, "put");
    test_cell(C1, "put");
    emit(MOVF(C2, TO_W)); emit(MOVWF(FSR));
    at("put");
    emit(MOVLW(4)); emit(MOVWF(INDF));
    emit(MOVF(FSR, TO_W)); emit(ADDLW(256 - BOARD)); emit(MOVWF(OUT));
    emit(INCF(MOVES, TO_F));
    find(12, "cwon");
    emit(MOVF(MOVES, TO_W)); emit(XORLW(9)); emit(BTFSC(STATUS, Z)); emit(GOTO(L("draw")));
    emit(GOTO(L("turn")));
    at("owon");  emit(MOVLW(1)); emit(GOTO(L("end")));
    at("cwon");  emit(MOVLW(2)); emit(GOTO(L("end")));
    at("draw");  emit(MOVLW(3));
    at("end");   emit(MOVWF(STAT));
    at("halt");  emit(SLEEP()); emit(GOTO(L("halt")));

    // findsum: W = 1 and LN/C0..C2 set if some line sums to TGT, else W = 0
    pc_asm = 'h100;
    at("findsum");
    emit(CLRF(LI));
    at("fs_loop");
    emit(MOVF(LI, TO_W)); emit(CALL(L("linesum")));
    emit(MOVF(SUM, TO_W)); emit(XORWF(TGT, TO_W)); emit(BTFSC(STATUS, Z)); emit(RETLW(1));
    emit(INCF(LI, TO_F)); emit(MOVF(LI, TO_W)); emit(XORLW(8));
    emit(BTFSS(STATUS, Z)); emit(GOTO(L("fs_loop")));
    emit(RETLW(0));

    // linesum: SUM = sum of the cells of line W, their addresses in C0..C2
    pc_asm = 'h140;
    at("linesum");
    emit(MOVWF(LN)); emit(ADDWF(LN, TO_W)); emit(ADDWF(LN, TO_W)); emit(MOVWF(BASE));
    emit(CLRF(SUM));
    for (int j = 0; j < 3; j++) begin
      if (j > 0) emit(INCF(BASE, TO_F));
      emit(MOVF(BASE, TO_W)); emit(CALL(L("ltab"))); emit(ADDLW(BOARD));
      emit(MOVWF(C0 + j)); emit(MOVWF(FSR)); emit(MOVF(INDF, TO_W)); emit(ADDWF(SUM, TO_F));
    end
    emit(RETURN());

    // table reads by computed jump into page 3 (PCLATH = 3)
    pc_asm = 'h2F0;
    at("ltab"); emit(MOVWF(PCL));
    at("ptab"); emit(ADDLW(24)); emit(MOVWF(PCL));
    pc_asm = 'h300;
    foreach (LINES[i]) emit(RETLW(LINES[i]));
    foreach (PREF[i]) emit(RETLW(PREF[i]));
  endtask

  localparam int LINES [24] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 0, 3, 6, 1, 4, 7, 2, 5, 8, 0, 4, 8, 2, 4, 6};
  localparam int PREF [9] = '{4, 0, 2, 6, 8, 1, 3, 5, 7};

  // ------------------------------------------------------------ game model
  int mb [9];

  function automatic int msum(input int l);
    return mb[LINES[3 * l]] + mb[LINES[3 * l + 1]] + mb[LINES[3 * l + 2]];
  endfunction

  function automatic int mfind(input int t);
    for (int l = 0; l < 8; l++) if (msum(l) == t) return l;
    return -1;
  endfunction

  function automatic int mcore_move();
    int l;
    l = mfind(8);
    if (l < 0) l = mfind(2);
    if (l >= 0) begin
      for (int j = 0; j < 3; j++) if (mb[LINES[3 * l + j]] == 0) return LINES[3 * l + j];
    end
    foreach (PREF[i]) if (mb[PREF[i]] == 0) return PREF[i];
    return -1;
  endfunction

  task automatic wait_sleep();
    int guard;
    guard = 0;
    while (!sleeping && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    @(negedge clk);
    check(guard < 200000, "core never went to sleep");
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    assemble();   // pass 1 collects the labels
    assemble();   // pass 2 resolves them
    for (int g = 0; g < 30; g++) begin
      int moves, stat_m, mv;
      for (int i = 0; i < 512; i++) u_ram.mem[i] = 8'($urandom());
      foreach (mb[i]) mb[i] = 0;
      moves = 0;
      stat_m = 0;
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      wait_sleep();
      while (stat_m == 0) begin
        // opponent: a random free cell
        do mv = $urandom_range(0, 8); while (mb[mv] != 0);
        mb[mv] = 1;
        moves++;
        u_ram.mem[MOVE] = 8'(mv);
        ext_int = 1'b1;
        @(negedge clk);
        ext_int = 1'b0;
        if (mfind(3) >= 0) stat_m = 1;
        else if (moves == 9) stat_m = 3;
        else begin
          int cm;
          cm = mcore_move();
          mb[cm] = 4;
          moves++;
          if (mfind(12) >= 0) stat_m = 2;
          else if (moves == 9) stat_m = 3;
          wait_sleep();
          n_turns++;
          check(int'(u_ram.mem[OUT]) == cm, $sformatf("game %0d: core played %0d, expected %0d",
                                                       g, u_ram.mem[OUT], cm));
        end
        if (stat_m != 0) wait_sleep();
        for (int i = 0; i < 9; i++)
          check(int'(u_ram.mem[BOARD + i]) == mb[i], $sformatf("game %0d: cell %0d", g, i));
        check(int'(u_ram.mem[STAT]) == stat_m, $sformatf("game %0d: status %0d, expected %0d",
                                                        g, u_ram.mem[STAT], stat_m));
        if (failures > 20) break;
      end
      case (stat_m)
        1: n_owon++;
        2: n_cwon++;
        default: n_draw++;
      endcase
      if (failures > 20) break;
    end
    $display("games: opponent won %0d, core won %0d, drawn %0d, core turns %0d",
             n_owon, n_cwon, n_draw, n_turns);
    check(n_cwon > 0 && n_draw + n_owon > 0, "outcomes not all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
