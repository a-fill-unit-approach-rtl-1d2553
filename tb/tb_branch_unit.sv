// tb_branch_unit: condition tests and next-address selection for every
// branch kind, with and without a branch in the group.
module tb_branch_unit;
  import fu_pkg::*;
  logic clk = 0;
  logic valid, taken;
  logic [3:0] op;
  logic [31:0] a, b, link_val, link_out;
  logic [AW-1:0] na, ba, np, exp_np;
  logic exp_t;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  branch_unit dut (.valid, .op, .a, .b, .link_val, .next_addr(na), .br_addr(ba),
                   .taken, .next_pc(np), .link_out);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      valid = (i % 9) != 0;
      op = 4'(i % 8);
      a = $urandom; b = (i % 3 == 0) ? a : $urandom;
      if (i % 5 == 0) a = 0;
      na = AW'($urandom); ba = AW'($urandom); link_val = $urandom;
      @(posedge clk);
      case (op)
        0: exp_t = a == b;  1: exp_t = a != b;
        2: exp_t = int'(a) <= 0; 3: exp_t = int'(a) > 0;
        4: exp_t = int'(a) < 0;  5: exp_t = int'(a) >= 0;
        default: exp_t = 1;
      endcase
      if (!valid) begin exp_t = 0; exp_np = na; end
      else if (op == 7) exp_np = a[31:2];
      else if (op == 6) exp_np = na;
      else exp_np = exp_t ? ba : na;
      checks++;
      if (taken !== exp_t || np !== exp_np || link_out !== link_val) begin
        failures++; $display("op %0d a %h b %h taken %b np %h exp %h", op, a, b, taken, np, exp_np); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
