// tb_sleep_ctrl: self-checking testbench for sleep_ctrl.
//
// Counts core clock pulses (gclk) against free clock pulses. While awake
// every clk pulse must reach gclk; after a one-cycle sleep request the edge
// that sets `sleeping` still passes and no further gclk pulse may appear
// until wake is raised; one clk edge after wake, pulses resume. A wake
// arriving together with the request must cancel the sleep.
module tb_sleep_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sleep_req, wake, gclk, sleeping;
  int   gcount = 0;
  int checks = 0, failures = 0;

  sleep_ctrl dut (.clk(clk), .rst_n(rst_n), .sleep_req(sleep_req), .wake(wake),
                  .gclk(gclk), .sleeping(sleeping));

  always #5 clk = ~clk;
  always @(posedge gclk) gcount++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pulses(input int n_clk, input int n_exp, input string what);
    int g0;
    g0 = gcount;
    repeat (n_clk) @(posedge clk);
    #1;
    checks++;
    if (gcount - g0 != n_exp) begin
      failures++;
      $display("FAIL %s: %0d gclk pulses in %0d clk, expected %0d", what, gcount - g0, n_clk, n_exp);
    end
  endtask

  initial begin
    sleep_req = 1'b0; wake = 1'b0;
    #12 rst_n = 1'b1;
    expect_pulses(10, 10, "awake");
    // request for one cycle
    @(negedge clk) sleep_req = 1'b1;
    @(posedge clk) #1;
    checks++;
    if (!sleeping) begin failures++; $display("FAIL not sleeping"); end
    @(negedge clk) sleep_req = 1'b0;
    expect_pulses(20, 0, "asleep");
    @(negedge clk) wake = 1'b1;
    @(negedge clk) wake = 1'b0;
    checks++;
    if (sleeping) begin failures++; $display("FAIL still sleeping after wake"); end
    expect_pulses(10, 10, "woken");
    // request and wake together: no sleep
    @(negedge clk) begin sleep_req = 1'b1; wake = 1'b1; end
    @(negedge clk) begin sleep_req = 1'b0; wake = 1'b0; end
    checks++;
    if (sleeping) begin failures++; $display("FAIL sleep not cancelled by wake"); end
    expect_pulses(5, 5, "cancelled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
