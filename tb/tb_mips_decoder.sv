// tb_mips_decoder: known instruction words and the fields they must
// decode to (unit class, function code, registers, immediate, target).
module tb_mips_decoder;
  import fu_pkg::*;
  import asm_pkg::*;
  logic clk = 0;
  logic [31:0] instr;
  logic [AW-1:0] pc;
  dec_t dec;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mips_decoder dut (.instr, .pc, .dec);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [31:0] w, input unit_class_e uc, input int fn,
                     input int rs, input logic rsu, input int rt, input logic rtu,
                     input int rd, input logic rdw, input logic ui, input logic [31:0] imm,
                     input logic cmp_imm);
    instr = w; #1;
    checks++;
    if (dec.uc !== uc || (uc != UC_NOP && uc != UC_HALT && uc != UC_FPU &&
        (dec.fn !== 4'(fn) || dec.rs_used !== rsu || (rsu && dec.rs !== 5'(rs)) ||
         dec.rt_used !== rtu || (rtu && dec.rt !== 5'(rt)) || dec.rd_wr !== rdw ||
         (rdw && dec.rd !== 5'(rd)) || dec.use_imm !== ui)) || (cmp_imm && dec.imm !== imm)) begin
      failures++;
      $display("instr %h: got uc %0d fn %0d rs %0d/%b rt %0d/%b rd %0d/%b ui %b imm %h", w, dec.uc, dec.fn,
               dec.rs, dec.rs_used, dec.rt, dec.rt_used, dec.rd, dec.rd_wr, dec.use_imm, dec.imm);
    end
  endtask

  initial begin
    pc = 30'h100;
    chk(addu(3, 1, 2),   UC_INT, ALU_ADD, 1, 1, 2, 1, 3, 1, 0, 0, 0);
    chk(subu(4, 5, 6),   UC_INT, ALU_SUB, 5, 1, 6, 1, 4, 1, 0, 0, 0);
    chk(nor_(7, 8, 9),   UC_INT, ALU_NOR, 8, 1, 9, 1, 7, 1, 0, 0, 0);
    chk(sltu(7, 8, 9),   UC_INT, ALU_SLTU, 8, 1, 9, 1, 7, 1, 0, 0, 0);
    chk(sll(2, 3, 5),    UC_INT, ALU_SLL, 3, 1, 0, 0, 2, 1, 1, 5, 1);
    chk(sra(2, 3, 31),   UC_INT, ALU_SRA, 3, 1, 0, 0, 2, 1, 1, 31, 1);
    chk(sllv(2, 3, 4),   UC_INT, ALU_SLL, 3, 1, 4, 1, 2, 1, 0, 0, 0);
    chk(addiu(5, 6, -3), UC_INT, ALU_ADD, 6, 1, 0, 0, 5, 1, 1, 32'hFFFF_FFFD, 1);
    chk(andi(5, 6, 16'h8001), UC_INT, ALU_AND, 6, 1, 0, 0, 5, 1, 1, 32'h0000_8001, 1);
    chk(lui(9, 16'h1234), UC_INT, ALU_OR, 0, 0, 0, 0, 9, 1, 1, 32'h1234_0000, 1);
    chk(addu(0, 1, 2),   UC_INT, ALU_ADD, 1, 1, 2, 1, 0, 0, 0, 0, 0);
    chk(lw(4, 8, 29),    UC_LS, LS_LW, 29, 1, 0, 0, 4, 1, 0, 8, 1);
    chk(sw(4, -8, 29),   UC_LS, LS_SW, 29, 1, 4, 1, 0, 0, 0, 32'hFFFF_FFF8, 1);
    chk(nop(),           UC_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    chk(brk(),           UC_HALT, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    chk(add_s(1, 2, 3),  UC_FPU, 0, 0, 0, 0, 0, 0, 0, 0, {6'h0, 5'd16, 5'd3, 5'd2, 5'd1, 6'h0}, 1);
    chk(32'hFC00_0000,   UC_NONE, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    chk(beq(1, 2, -4),   UC_BR, BR_BEQ, 1, 1, 2, 1, 0, 0, 0, 0, 0);
    checks++; if (dec.target !== 30'h100 + 1 - 4) begin failures++; $display("beq target %h", dec.target); end
    chk(bgez(3, 7),      UC_BR, BR_BGEZ, 3, 1, 0, 0, 0, 0, 0, 0, 0);
    checks++; if (dec.target !== 30'h108) begin failures++; $display("bgez target %h", dec.target); end
    chk(jal(30'h2345),   UC_BR, BR_J, 0, 0, 0, 0, 31, 1, 0, {30'h102, 2'b00}, 1);
    checks++; if (dec.target !== 30'h2345 || !dec.link) begin failures++; $display("jal target %h", dec.target); end
    chk(jr(31),          UC_BR, BR_JR, 31, 1, 0, 0, 0, 0, 0, 0, 0);
    chk(jalr(5, 6),      UC_BR, BR_JR, 6, 1, 0, 0, 5, 1, 0, {30'h102, 2'b00}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
