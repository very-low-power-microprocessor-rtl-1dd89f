// tb_bit_mask: self-checking testbench for bit_mask.
//
// Tries all 32 values of pmdb(11..7) and compares the mask with one worked
// out bit by bit: a single one at the bit number, inverted when the two
// operation bits are 00 (BCF).
module tb_bit_mask;
  logic [4:0] sel;
  logic [7:0] mask, expect_m;
  int checks = 0, failures = 0;

  bit_mask dut (.sel(sel), .mask(mask));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      sel = 5'(s);
      #1;
      for (int b = 0; b < 8; b++) expect_m[b] = ((b == (s % 8)) != ((s / 8) == 0));
      checks++;
      if (mask !== expect_m) begin
        failures++;
        $display("FAIL sel=%b mask=%b expected %b", sel, mask, expect_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
