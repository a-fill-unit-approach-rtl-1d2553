// tb_int_alu: random operands for every ALU operation, compared with a
// reference computed in the testbench.
module tb_int_alu;
  import fu_pkg::*;
  logic clk = 0;
  logic [3:0] op;
  logic [31:0] a, b, y, exp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  int_alu dut (.op, .a, .b, .y);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = 4'(i % 11);
      a  = $urandom; b = (i % 7 == 0) ? a : $urandom;
      if (i % 13 == 0) a = 32'h8000_0000;
      @(posedge clk);
      case (op)
        0: exp = a + b;   1: exp = a - b;   2: exp = a & b;   3: exp = a | b;
        4: exp = a ^ b;   5: exp = ~(a | b);
        6: exp = (int'(a) < int'(b)) ? 1 : 0;
        7: exp = (a < b) ? 1 : 0;
        8: exp = a << (b % 32); 9: exp = a >> (b % 32);
        default: exp = 32'(int'(a) >>> (b % 32));
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("op %0d a %h b %h y %h exp %h", op, a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
