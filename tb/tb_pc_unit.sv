// tb_pc_unit: self-checking testbench for pc_unit.
//
// Drives random combinations of inc, jump, ret and pcl_wr with random
// operands and compares the PC after each rising edge with a reference
// computed in the testbench: ret loads the stack top, jump loads
// {PCLATH[4:3], k}, a PCL write loads {PCLATH, data}, inc adds one with
// 13-bit wrap-around. Each kind of load is counted and must occur.
module tb_pc_unit;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        inc, jump, ret, pcl_wr;
  logic [10:0] k;
  logic [4:0]  pclath;
  logic [7:0]  data;
  logic [12:0] stack_top, pc, model;
  int checks = 0, failures = 0;
  int n_inc = 0, n_jump = 0, n_ret = 0, n_pcl = 0, n_wrap = 0;

  pc_unit #(.PCW(13)) dut (
    .clk(clk), .rst_n(rst_n), .inc(inc), .jump(jump), .ret(ret), .pcl_wr(pcl_wr),
    .k(k), .pclath(pclath), .data(data), .stack_top(stack_top), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {inc, jump, ret, pcl_wr} = '0;
    k = '0; pclath = '0; data = '0; stack_top = '0;
    #12;
    checks++;
    if (pc !== '0) failures++;
    model = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int sel;
      @(negedge clk);
      sel = $urandom_range(0, 7);
      {inc, jump, ret, pcl_wr} = '0;
      case (sel)
        0: jump = 1'b1;
        1: ret = 1'b1;
        2: pcl_wr = 1'b1;
        3: ;
        default: inc = 1'b1;
      endcase
      k = 11'($urandom()); pclath = 5'($urandom()); data = 8'($urandom());
      stack_top = (i % 50 == 7) ? 13'h1FFF : 13'($urandom());
      @(posedge clk);
      if (ret) begin model = stack_top; n_ret++; end
      else if (jump) begin model = {pclath[4:3], k}; n_jump++; end
      else if (pcl_wr) begin model = {pclath, data}; n_pcl++; end
      else if (inc) begin
        if (model == 13'h1FFF) n_wrap++;
        model = (model == 13'h1FFF) ? 13'h0 : model + 13'd1;
        n_inc++;
      end
      #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL step %0d sel=%0d pc=%h expected %h", i, sel, pc, model);
      end
    end
    checks++;
    if (n_inc == 0 || n_jump == 0 || n_ret == 0 || n_pcl == 0) failures++;
    $display("loads: inc=%0d jump=%0d ret=%0d pcl=%0d wrap=%0d", n_inc, n_jump, n_ret, n_pcl, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
