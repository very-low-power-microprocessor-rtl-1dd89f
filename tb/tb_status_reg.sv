// tb_status_reg: self-checking testbench for status_reg.
//
// Checks the reset value 0x18, then applies random flag updates, file
// writes, SLEEP (pd_clr) and CLRWDT (wdt_clr) pulses and compares with a
// reference: file writes reach IRP/RP1/RP0 and the flags not updated by the
// same instruction, TO/PD change only through pd_clr and wdt_clr.
module tb_status_reg;
  import mcu_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  flags_t     flags_en, flags;
  logic       we, pd_clr, wdt_clr;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  status_reg dut (.clk(clk), .rst_n(rst_n), .flags_en(flags_en), .flags(flags), .we(we),
                  .d(d), .pd_clr(pd_clr), .wdt_clr(wdt_clr), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags_en = '0; flags = '0; we = 1'b0; d = '0; pd_clr = 1'b0; wdt_clr = 1'b0;
    #12;
    checks++;
    if (q !== 8'h18) begin failures++; $display("FAIL reset %h", q); end
    model = 8'h18;
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      flags_en = 3'($urandom());
      flags    = 3'($urandom());
      we       = 1'($urandom_range(0, 1));
      d        = 8'($urandom());
      pd_clr   = ($urandom_range(0, 9) == 0);
      wdt_clr  = !pd_clr && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (we) begin
        model[7:5] = d[7:5];
        model[2:0] = d[2:0];
      end
      if (flags_en.z)  model[2] = flags.z;
      if (flags_en.dc) model[1] = flags.dc;
      if (flags_en.c)  model[0] = flags.c;
      if (pd_clr)  model[4:3] = 2'b10;
      if (wdt_clr) model[4:3] = 2'b11;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
