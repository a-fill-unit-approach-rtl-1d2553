// int_alu: one integer execution unit (int_1 or int_2).
//
// Computes y = a <op> b for the operations of fu_pkg::alu_op_e. In the
// processor int_1 is the cascaded half-cycle ALU whose result may feed
// int_2, the load/store units and the branch unit within the same line;
// the cascade itself is only the wiring of int_1's y to the consumers'
// operand selectors, so both instances are this same module.
//
// Purely combinational.
module int_alu
  import fu_pkg::*;
(
  input  logic [3:0]  op,    // alu_op_e
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  always_comb begin
    unique case (alu_op_e'(op))
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'h0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'h0, a < b};
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = $unsigned($signed(a) >>> b[4:0]);
      default:  y = '0;
    endcase
  end

endmodule
