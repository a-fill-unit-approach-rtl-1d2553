// branch_unit: condition test and next-instruction-address generation.
//
// Every issue cycle the unit delivers the address of the next group to
// fetch. With no branch in the group it is the group's next_addr field.
// For a conditional branch it is br_addr when the condition holds and
// next_addr otherwise; for J/JAL the target already sits in next_addr;
// for JR/JALR it is the register operand a. a and b arrive from read
// ports or forwarded from int_1. For JAL/JALR the link value (the byte
// address after the delay slot, prepared by the decoder) is passed out
// for write-back.
//
// Purely combinational.
module branch_unit
  import fu_pkg::*;
(
  input  logic          valid,      // the group holds a branch
  input  logic [3:0]    op,         // br_op_e
  input  logic [31:0]   a,
  input  logic [31:0]   b,
  input  logic [31:0]   link_val,
  input  logic [AW-1:0] next_addr,
  input  logic [AW-1:0] br_addr,
  output logic          taken,
  output logic [AW-1:0] next_pc,
  output logic [31:0]   link_out
);

  logic cond;

  always_comb begin
    unique case (br_op_e'(op))
      BR_BEQ:  cond = a == b;
      BR_BNE:  cond = a != b;
      BR_BLEZ: cond = $signed(a) <= 0;
      BR_BGTZ: cond = $signed(a) > 0;
      BR_BLTZ: cond = $signed(a) < 0;
      BR_BGEZ: cond = $signed(a) >= 0;
      default: cond = 1'b1;
    endcase
    taken    = valid && cond;
    link_out = link_val;
    if (!valid)
      next_pc = next_addr;
    else if (br_op_e'(op) == BR_JR)
      next_pc = a[31:2];
    else if (br_op_e'(op) == BR_J)
      next_pc = next_addr;
    else
      next_pc = cond ? br_addr : next_addr;
  end

endmodule
