// tb_ir_reg: self-checking testbench for ir_reg (the Instruction Register).
//
// Drives random 14-bit instruction words and load pulses and checks after
// every rising clock edge that the IR holds the last word loaded, and that
// it resets to the NOP encoding (zero). A watchdog ends a hung run.
module tb_ir_reg;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load;
  logic [13:0] pmdb_in, pmdb, model;
  int checks = 0, failures = 0;

  ir_reg #(.IW(14)) dut (.clk(clk), .rst_n(rst_n), .load(load), .pmdb_in(pmdb_in), .pmdb(pmdb));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0;
    pmdb_in = '0;
    #12;
    checks++;
    if (pmdb !== '0) failures++;
    model = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load    = (i % 4 == 0) || ($urandom_range(0, 3) == 0);
      pmdb_in = 14'($urandom());
      @(posedge clk);
      if (load) model = pmdb_in;
      #1;
      checks++;
      if (pmdb !== model) begin
        failures++;
        $display("FAIL step %0d ir=%h expected %h", i, pmdb, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
