// fu_pkg: types and constants shared by the fill-unit processor.
//
// The processor executes a MIPS-I integer subset. Scalar instructions are
// decoded into dec_t; the fill unit packs several of them into a line_t,
// the "wide" instruction that the shadow cache stores and the execution
// units consume. A line has one fixed slot per functional unit
// (int_1, int_2, ld/st_1, ld/st_2, branch, fpu), a table of the eight
// register-file read ports it uses, and two sequencing fields: the next
// instruction address and the branch-taken address.
//
// Instruction addresses are 30-bit word addresses (byte address >> 2);
// the sequencing fields are therefore 30 bits wide.
//
// Each operand of a slot names where its value comes from (src_t): the
// constant zero, one of the read ports, or a result forwarded inside the
// line. Forwarding from int_1 (the cascaded half-cycle ALU) is open to
// int_2, both load/store units and the branch unit. A store's data may in
// addition come from int_2 or from a load in ld/st_1, standing in for the
// store buffer that lets a store wait for its value.
package fu_pkg;

  localparam int XLEN     = 32;
  localparam int AW       = 30;   // word address width of instruction fetch
  localparam int NREG     = 32;
  localparam int NPORTS   = 8;    // register-file read ports per line
  localparam int PW       = 3;    // bits to name a read port
  localparam int NSLOT    = 6;    // functional units
  localparam int LINE_MAX = 6;    // instructions a line may cover
  localparam int NWR      = 5;    // register-file write ports

  // slot positions inside a line
  localparam int S_INT1 = 0;
  localparam int S_INT2 = 1;
  localparam int S_LS1  = 2;
  localparam int S_LS2  = 3;
  localparam int S_BR   = 4;
  localparam int S_FPU  = 5;

  typedef enum logic [2:0] {
    UC_NONE,   // not supported: the core halts with an error
    UC_NOP,    // all-zero word: covered by a line but uses no unit
    UC_INT,
    UC_LS,
    UC_BR,
    UC_FPU,
    UC_HALT    // BREAK: stops the core
  } unit_class_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  typedef enum logic [3:0] {LS_LW, LS_SW} ls_op_e;

  typedef enum logic [3:0] {
    BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ, BR_J, BR_JR
  } br_op_e;

  typedef enum logic [2:0] {
    SRC_ZERO,  // constant 0 (register r0 or unused operand)
    SRC_PORT,  // register-file read port named by src_t.port
    SRC_INT1,  // result of int_1 in the same line
    SRC_INT2,  // result of int_2 (store data only)
    SRC_LS1    // load result of ld/st_1 (store data of ld/st_2 only)
  } src_sel_e;

  typedef struct packed {
    src_sel_e        sel;
    logic [PW-1:0]   port;
  } src_t;

  // One decoded scalar instruction.
  // Operand convention: the unit computes  a <op> b.  a is register rs,
  // b is register rt or the immediate. Shifts are normalised by the
  // decoder so that a is the value shifted and b the shift amount.
  typedef struct packed {
    unit_class_e     uc;
    logic [3:0]      fn;       // alu_op_e / ls_op_e / br_op_e
    logic [4:0]      rs;
    logic            rs_used;
    logic [4:0]      rt;
    logic            rt_used;
    logic [4:0]      rd;       // destination, rd_wr is 0 for r0
    logic            rd_wr;
    logic            use_imm;
    logic            link;     // JAL / JALR
    logic [31:0]     imm;      // extended immediate, link value, or fpu fields
    logic [AW-1:0]   target;   // taken target of a branch or jump
  } dec_t;

  typedef struct packed {
    logic            valid;
    logic [3:0]      fn;
    src_t            a;
    src_t            b;
    logic            use_imm;
    logic            link;
    logic [31:0]     imm;
    logic [4:0]      rd;
    logic            rd_wr;
  } slot_t;

  typedef struct packed {
    slot_t [NSLOT-1:0]            slot;
    logic  [NPORTS-1:0]           port_used;
    logic  [NPORTS-1:0][4:0]      port_reg;
    logic  [AW-1:0]               next_addr;  // untaken / sequential successor
    logic  [AW-1:0]               br_addr;    // taken successor of a conditional branch
    logic  [2:0]                  ninstr;     // scalar instructions covered
  } line_t;

  // What the shadow cache stores. A tree-like line (tree = 1) carries
  // both paths past one conditional branch: part[0] is the untaken path,
  // part[1] the taken path. Both hold the same instructions up to and
  // including the branch and its delay slot; each continues along its own
  // path and has its own next_addr. dir is the direction that was
  // followed while the line was filled. A simple line uses part[0] only.
  typedef struct packed {
    logic        tree;
    logic        dir;
    line_t [1:0] part;
  } sline_t;


  // Why a placement failed (and therefore why a line was finalized).
  typedef enum logic [2:0] {
    FIN_NONE, FIN_DEP, FIN_UNIT, FIN_PORT, FIN_BRANCH, FIN_FLUSH, FIN_OTHER
  } fin_e;

  typedef struct packed {
    logic  ok;
    fin_e  why;
    line_t line;
  } place_t;

  // Pulses the core raises, one per event and cycle, for statistics.
  typedef struct packed {
    logic shadow_issue;   // a stored line was issued
    logic scalar_issue;   // one instruction issued from the i-cache path
    logic line_write;     // a finished line was written into the shadow cache
    logic fin_branch;     // a line was finalized by a branch and its delay slot
    logic fin_dep;        // ... by a RAW or WAW dependency
    logic fin_unit;       // ... by a busy functional unit or a full line
    logic fin_port;       // ... by running out of read ports
    logic fin_flush;      // ... because a stored line preempted the scalar path
    logic ds_split;       // branch and delay slot got a line of their own
    logic discard;        // a one-instruction line was not stored
    logic fwd_int1;       // an operand came from the cascaded int_1
    logic fwd_store;      // a store took its value from int_2 or a load in the line
    logic ls_raw;         // ld/st_2 load took data from the ld/st_1 store
    logic ls_waw;         // two stores to one word: the later one won
    logic taken;          // a branch or jump was taken
    logic fpu_issue;      // an operation was sent to the floating-point unit
    logic tree_issue;     // a tree-like line was issued
    logic mispredict;     // ... down the wrong path: squashed and reissued
    logic backup;         // a reissued tree-line path was extended by filling
  } events_t;

  function automatic line_t empty_line();
    line_t l;
    l = '0;
    return l;
  endfunction

  // Where does register r come from, for a consumer in slot s?
  // data_role marks the store-value operand of a load/store unit.
  // Returns ok=0 with the reason when the value is not reachable.
  function automatic logic src_resolve(input line_t l, input int s, input logic used,
                                       input logic [4:0] r, input logic data_role,
                                       output src_t src, output line_t lo, output fin_e why);
    int prod;
    int free_p;
    int hit_p;
    lo  = l;
    src = '{sel: SRC_ZERO, port: '0};
    why = FIN_NONE;
    if (!used || r == 5'd0) return 1'b1;
    prod = -1;
    for (int i = 0; i < NSLOT; i++)
      if (l.slot[i].valid && l.slot[i].rd_wr && l.slot[i].rd == r) prod = i;
    if (prod >= 0) begin
      if (prod == S_INT1 && s != S_INT1 && s != S_FPU) begin
        src.sel = SRC_INT1;
        return 1'b1;
      end
      if (data_role && (s == S_LS1 || s == S_LS2) && prod == S_INT2) begin
        src.sel = SRC_INT2;
        return 1'b1;
      end
      if (data_role && s == S_LS2 && prod == S_LS1) begin
        src.sel = SRC_LS1;
        return 1'b1;
      end
      why = FIN_DEP;
      return 1'b0;
    end
    hit_p  = -1;
    free_p = -1;
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (l.port_used[p] && l.port_reg[p] == r) hit_p = p;
      if (!l.port_used[p]) free_p = p;
    end
    if (hit_p >= 0) begin
      src = '{sel: SRC_PORT, port: PW'(hit_p)};
      return 1'b1;
    end
    if (free_p >= 0) begin
      lo.port_used[free_p] = 1'b1;
      lo.port_reg[free_p]  = r;
      src = '{sel: SRC_PORT, port: PW'(free_p)};
      return 1'b1;
    end
    why = FIN_PORT;
    return 1'b0;
  endfunction

  // Try to add instruction d to line l: pick the unit, resolve both
  // operands, and reject a WAW on the destination. The incoming
  // instruction is compared with the at most five already in the line.
  function automatic place_t try_place(input line_t l, input dec_t d);
    place_t r;
    int     s;
    line_t  l1, l2;
    src_t   sa, sb;
    fin_e   w;
    r.ok   = 1'b0;
    r.why  = FIN_NONE;
    r.line = l;
    s      = -1;
    if (int'(l.ninstr) >= LINE_MAX) begin
      r.why = FIN_UNIT;
      return r;
    end
    unique case (d.uc)
      UC_NOP: begin
        r.ok = 1'b1;
        r.line.ninstr = l.ninstr + 3'd1;
        return r;
      end
      UC_INT: s = !l.slot[S_INT1].valid ? S_INT1 : (!l.slot[S_INT2].valid ? S_INT2 : -1);
      UC_LS:  s = !l.slot[S_LS1].valid  ? S_LS1  : (!l.slot[S_LS2].valid  ? S_LS2  : -1);
      UC_BR:  s = !l.slot[S_BR].valid   ? S_BR   : -1;
      UC_FPU: s = !l.slot[S_FPU].valid  ? S_FPU  : -1;
      default: begin
        r.why = FIN_OTHER;
        return r;
      end
    endcase
    if (s < 0) begin
      r.why = FIN_UNIT;
      return r;
    end
    if (!src_resolve(l, s, d.rs_used, d.rs, 1'b0, sa, l1, w)) begin
      r.why = w;
      return r;
    end
    if (!src_resolve(l1, s, d.rt_used && !d.use_imm, d.rt, d.uc == UC_LS, sb, l2, w)) begin
      r.why = w;
      return r;
    end
    if (d.rd_wr)
      for (int i = 0; i < NSLOT; i++)
        if (l.slot[i].valid && l.slot[i].rd_wr && l.slot[i].rd == d.rd) begin
          r.why = FIN_DEP;
          return r;
        end
    r.line = l2;
    r.line.slot[s] = '{valid: 1'b1, fn: d.fn, a: sa, b: sb, use_imm: d.use_imm,
                       link: d.link, imm: d.imm, rd: d.rd, rd_wr: d.rd_wr};
    r.line.ninstr = l.ninstr + 3'd1;
    r.ok = 1'b1;
    return r;
  endfunction

endpackage
