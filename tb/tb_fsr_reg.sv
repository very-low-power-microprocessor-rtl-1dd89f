// tb_fsr_reg: self-checking testbench for fsr_reg (the FSR indirect address register).
//
// Applies a random sequence of load enables and data values and compares
// the register output after every rising clock edge with a reference copy
// kept by the testbench; also checks the reset value and that the value
// holds while the enable is low. A watchdog ends the run if it hangs.
module tb_fsr_reg;
  localparam int unsigned W = 8;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         we;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0, loads = 0;

  fsr_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0;
    d  = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    model = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      d  = W'($urandom());
      @(posedge clk);
      if (we) begin model = d; loads++; end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d we=%0b d=%h q=%h expected %h", i, we, d, q, model);
      end
    end
    checks++;
    if (loads < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
