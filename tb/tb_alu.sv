// tb_alu: self-checking testbench for alu.
//
// For every operation it loads random operands (with corner values mixed
// in) through the input registers and compares result, Z, DC and C with a
// reference written here in plain integer arithmetic. It also checks that
// the held inputs do not change while en is low: the result must stay put
// when the operand inputs move.
module tb_alu;
  import mcu_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en, cin;
  logic [7:0] a, b, y;
  alu_op_t    op;
  logic       z, dc, c;
  int checks = 0, failures = 0;

  alu dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .op(op), .cin(cin),
           .y(y), .z(z), .dc(dc), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 5))
      0: return 8'h00;
      1: return 8'hFF;
      2: return 8'h0F;
      default: return 8'($urandom());
    endcase
  endfunction

  // reference: returns {y, dc, c}; cflag/dcflag -1 when the op leaves them
  task automatic model(input int o, input int ia, input int ib, input int ci,
                       output int ry, output int rdc, output int rc);
    rdc = -1; rc = -1;
    case (o)
      0: ry = ia;
      1: ry = ib;
      2: begin ry = (ia + ib) % 256; rc = int'((ia + ib) > 255); rdc = int'(((ia % 16) + (ib % 16)) > 15); end
      3: begin ry = (ib - ia + 256) % 256; rc = int'(ib >= ia); rdc = int'((ib % 16) >= (ia % 16)); end
      4: ry = ia & ib;
      5: ry = ia | ib;
      6: ry = ia ^ ib;
      7: ry = 255 - ib;
      8: ry = (ib + 1) % 256;
      9: ry = (ib + 255) % 256;
      10: begin ry = ((ib * 2) % 256) + ci; rc = ib / 128; end
      11: begin ry = (ib / 2) + 128 * ci; rc = ib % 2; end
      12: ry = (ib % 16) * 16 + ib / 16;
      default: ry = 0;
    endcase
  endtask

  initial begin
    en = 1'b0; a = '0; b = '0; cin = 1'b0; op = ALU_PASSA;
    #12 rst_n = 1'b1;
    for (int o = 0; o <= 13; o++) begin
      for (int i = 0; i < 200; i++) begin
        int ry, rdc, rc;
        @(negedge clk);
        a = pick(); b = pick(); cin = 1'($urandom_range(0, 1));
        op = alu_op_t'(o);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        model(o, int'(a), int'(b), int'(cin), ry, rdc, rc);
        // move the inputs: the registered result must not follow
        a = ~a; b = ~b;
        #1;
        checks++;
        if (y !== 8'(ry) || z !== (ry == 0) || (rc >= 0 && c !== 1'(rc)) || (rdc >= 0 && dc !== 1'(rdc))) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h cin=%0b y=%h z=%0b dc=%0b c=%0b expected y=%h dc=%0d c=%0d",
                   o, ~a, ~b, cin, y, z, dc, c, ry[7:0], rdc, rc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
