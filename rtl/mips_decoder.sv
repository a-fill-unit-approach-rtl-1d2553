// mips_decoder: decodes one 32-bit MIPS-I instruction into a dec_t.
//
// The instruction is sorted by the functional unit that executes it
// (integer, load/store, branch, floating point), and its operation is
// re-encoded as a short function code for that unit, so neither the
// execution units nor the shadow cache see raw MIPS opcodes. Register
// fields are normalised: operand a is always the register read first,
// operand b the second register or the immediate; constant shifts carry
// their shift amount as the immediate. Branch and jump targets are
// computed here from the instruction's own word address pc.
//
// Supported: ADD/ADDU/SUB/SUBU/AND/OR/XOR/NOR/SLT/SLTU, SLL/SRL/SRA and
// their variable forms, ADDI/ADDIU/SLTI/SLTIU/ANDI/ORI/XORI/LUI, LW, SW,
// BEQ/BNE/BLEZ/BGTZ/BLTZ/BGEZ, J/JAL/JR/JALR, single/double COP1
// arithmetic (passed to the floating-point unit as packed fields), the
// all-zero NOP and BREAK (halt). ADD/ADDI/SUB do not trap on overflow in
// this design. Anything else decodes as UC_NONE.
//
// Purely combinational.
module mips_decoder
  import fu_pkg::*;
(
  input  logic [31:0]   instr,
  input  logic [AW-1:0] pc,      // word address of instr
  output dec_t          dec
);

  logic [5:0]  op, funct;
  logic [4:0]  rs, rt, rd, sh;
  logic [15:0] i16;
  logic [31:0] sext, zext;
  logic [AW-1:0] pc1, pc2;

  assign op    = instr[31:26];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign sh    = instr[10:6];
  assign funct = instr[5:0];
  assign i16   = instr[15:0];
  assign sext  = {{16{i16[15]}}, i16};
  assign zext  = {16'h0, i16};
  assign pc1   = pc + AW'(1);
  assign pc2   = pc + AW'(2);

  always_comb begin
    dec         = '0;
    dec.uc      = UC_NONE;
    dec.target  = pc1 + AW'(signed'(i16));
    unique case (op)
      6'h00: begin
        // R-type: a = rs, b = rt, destination rd
        dec.uc      = UC_INT;
        dec.rs      = rs;
        dec.rs_used = 1'b1;
        dec.rt      = rt;
        dec.rt_used = 1'b1;
        dec.rd      = rd;
        dec.rd_wr   = 1'b1;
        unique case (funct)
          6'h00, 6'h02, 6'h03: begin      // SLL/SRL/SRA: a = rt, b = shamt
            dec.rs      = rt;
            dec.rt_used = 1'b0;
            dec.use_imm = 1'b1;
            dec.imm     = {27'h0, sh};
            dec.fn      = funct == 6'h00 ? ALU_SLL : (funct == 6'h02 ? ALU_SRL : ALU_SRA);
          end
          6'h04, 6'h06, 6'h07: begin      // SLLV/SRLV/SRAV: a = rt, b = rs
            dec.rs = rt;
            dec.rt = rs;
            dec.fn = funct == 6'h04 ? ALU_SLL : (funct == 6'h06 ? ALU_SRL : ALU_SRA);
          end
          6'h08, 6'h09: begin             // JR / JALR
            dec.uc      = UC_BR;
            dec.fn      = BR_JR;
            dec.rt_used = 1'b0;
            dec.link    = funct == 6'h09;
            dec.rd_wr   = funct == 6'h09;
            dec.imm     = {pc2, 2'b00};
          end
          6'h0D: dec = '{uc: UC_HALT, default: '0};
          6'h20, 6'h21: dec.fn = ALU_ADD;
          6'h22, 6'h23: dec.fn = ALU_SUB;
          6'h24: dec.fn = ALU_AND;
          6'h25: dec.fn = ALU_OR;
          6'h26: dec.fn = ALU_XOR;
          6'h27: dec.fn = ALU_NOR;
          6'h2A: dec.fn = ALU_SLT;
          6'h2B: dec.fn = ALU_SLTU;
          default: dec.uc = UC_NONE;
        endcase
        if (instr == 32'h0) dec = '{uc: UC_NOP, default: '0};
      end
      6'h01: begin                        // BLTZ / BGEZ
        dec.uc      = (rt == 5'd0 || rt == 5'd1) ? UC_BR : UC_NONE;
        dec.fn      = rt == 5'd0 ? BR_BLTZ : BR_BGEZ;
        dec.rs      = rs;
        dec.rs_used = 1'b1;
      end
      6'h02, 6'h03: begin                 // J / JAL
        dec.uc     = UC_BR;
        dec.fn     = BR_J;
        dec.target = {pc1[AW-1:26], instr[25:0]};
        dec.link   = op == 6'h03;
        dec.rd     = 5'd31;
        dec.rd_wr  = op == 6'h03;
        dec.imm    = {pc2, 2'b00};
      end
      6'h04, 6'h05, 6'h06, 6'h07: begin   // BEQ / BNE / BLEZ / BGTZ
        dec.uc      = UC_BR;
        dec.fn      = op == 6'h04 ? BR_BEQ : op == 6'h05 ? BR_BNE : op == 6'h06 ? BR_BLEZ : BR_BGTZ;
        dec.rs      = rs;
        dec.rs_used = 1'b1;
        dec.rt      = rt;
        dec.rt_used = op == 6'h04 || op == 6'h05;
      end
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F: begin
        dec.uc      = UC_INT;
        dec.rs      = rs;
        dec.rs_used = op != 6'h0F;
        dec.rd      = rt;
        dec.rd_wr   = 1'b1;
        dec.use_imm = 1'b1;
        dec.imm     = sext;
        unique case (op)
          6'h08, 6'h09: dec.fn = ALU_ADD;
          6'h0A:        dec.fn = ALU_SLT;
          6'h0B:        dec.fn = ALU_SLTU;
          6'h0C: begin dec.fn = ALU_AND; dec.imm = zext; end
          6'h0D: begin dec.fn = ALU_OR;  dec.imm = zext; end
          6'h0E: begin dec.fn = ALU_XOR; dec.imm = zext; end
          default: begin                  // LUI: 0 | (imm << 16)
            dec.fn = ALU_OR;
            dec.rs = 5'd0;
            dec.imm = {i16, 16'h0};
          end
        endcase
      end
      6'h11: begin                        // COP1 arithmetic, fmt S or D
        dec.uc  = (rs == 5'd16 || rs == 5'd17) ? UC_FPU : UC_NONE;
        dec.imm = {6'h0, instr[25:0]};
      end
      6'h23, 6'h2B: begin                 // LW / SW
        dec.uc      = UC_LS;
        dec.fn      = op == 6'h23 ? LS_LW : LS_SW;
        dec.rs      = rs;
        dec.rs_used = 1'b1;
        dec.rt      = rt;
        dec.rt_used = op == 6'h2B;
        dec.rd      = rt;
        dec.rd_wr   = op == 6'h23;
        dec.imm     = sext;
      end
      default: dec.uc = UC_NONE;
    endcase
    if (dec.rd == 5'd0) dec.rd_wr = 1'b0;
  end

endmodule
