// tb_hw_stack: self-checking testbench for hw_stack.
//
// Checks the top of stack after reset (zero), the order of a nested
// push/pop sequence, an overflow of DEPTH+3 pushes that must lose the
// oldest entries, an underflow that must keep repeating the bottom entry,
// and a random mix of pushes, pops and idle cycles against a reference
// shift register kept by the testbench, checking the top after every step.
module tb_hw_stack;
  localparam int unsigned DEPTH = 8;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        push, pop;
  logic [12:0] din, top;
  logic [12:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  hw_stack #(.DEPTH(DEPTH), .PCW(13)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .pop(pop), .din(din), .top(top));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic pu, input logic po, input logic [12:0] v);
    @(negedge clk);
    push = pu; pop = po; din = v;
    @(posedge clk);
    if (pu) begin
      for (int i = DEPTH - 1; i > 0; i--) ref_mem[i] = ref_mem[i-1];
      ref_mem[0] = v;
    end else if (po) begin
      for (int i = 0; i < DEPTH - 1; i++) ref_mem[i] = ref_mem[i+1];
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0;
  endtask

  initial begin
    push = 1'b0; pop = 1'b0; din = '0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    #12 rst_n = 1'b1;
    checks++;
    if (top !== '0) begin failures++; $display("FAIL reset top=%0d", top); end
    // nested calls, then returns in reverse order
    for (int i = 0; i < 5; i++) begin
      step(1'b1, 1'b0, 13'(100 + i));
      checks++;
      if (top !== 13'(100 + i)) begin failures++; $display("FAIL push %0d top=%0d", i, top); end
    end
    for (int i = 4; i >= 0; i--) begin
      checks++;
      if (top !== 13'(100 + i)) begin failures++; $display("FAIL pop %0d top=%0d", i, top); end
      step(1'b0, 1'b1, '0);
    end
    // overflow: DEPTH+3 pushes keep only the last DEPTH
    for (int i = 0; i < DEPTH + 3; i++) step(1'b1, 1'b0, 13'(2000 + i));
    for (int i = DEPTH + 2; i >= 3; i--) begin
      checks++;
      if (top !== 13'(2000 + i)) begin failures++; $display("FAIL overflow %0d top=%0d", i, top); end
      step(1'b0, 1'b1, '0);
    end
    // underflow: the bottom entry (2003) stays and keeps coming back
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (top !== 13'(2003)) begin failures++; $display("FAIL underflow %0d top=%0d", i, top); end
      step(1'b0, 1'b1, '0);
    end
    // random mix against the reference
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 13'(2003);
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 2);
      step(r == 0, r == 1, 13'($urandom()));
      checks++;
      if (top !== ref_mem[0]) begin
        failures++; $display("FAIL random %0d top=%h exp=%h", i, top, ref_mem[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
