// fill_unit: packs the scalar instruction stream into shadow-cache lines.
//
// Each cycle in which the core executes one instruction on the scalar
// path, that instruction (decoded), its word address and, for a branch,
// whether it was taken arrive here. The unit tries to add it to the line
// under construction with fu_pkg::try_place, which checks the single
// newcomer against the at most five instructions already in the line:
//   * it must find a free unit of its kind (int_1 then int_2, ld/st_1
//     then ld/st_2, branch, fpu; a line covers at most six
//     instructions);
//   * a source written earlier in the line is only reachable when it is
//     forwarded from int_1 (cascaded ALU), or when it is a store value
//     produced by int_2 or by a load in ld/st_1; any other RAW fails;
//   * a second writer of a register (WAW) fails; WAR is allowed because
//     the whole line reads the register file before any unit writes;
//   * each source not produced in the line needs one of the eight read
//     ports; a register already given a port shares it.
// When the newcomer does not fit, the current line is finalized with
// next_addr = the newcomer's address and the newcomer starts a new line.
//
// Branches and MIPS delay slots: a branch is held back until its delay
// slot arrives. If both fit into the current line they are added to it;
// otherwise the current line is finalized before the branch and the
// branch and delay slot start a line of their own.
//   TREE = 0 (simple lines): the branch and delay slot complete the line
//     (next_addr = address after the delay slot for a conditional branch,
//     or the jump target; br_addr = taken target). A branch line split
//     off on its own is written one cycle later from a holding register.
//   TREE = 1 (tree-like lines): after a conditional branch and its delay
//     slot the line forks. The copy for the path not followed is frozen
//     with that path's successor as its next_addr; filling goes on along
//     the path the program actually took, until a finalization condition
//     or a second branch (one branch per line). Jumps still close the
//     line as in TREE = 0.
//
// Back-up (TREE = 1): when the core reissues a tree-like line along its
// other path after a misprediction, it raises resume together with flush
// and hands over the line, its address and the path now issued. That path
// becomes the line under construction again (the other path is frozen),
// so the instructions fetched next from the i-cache extend it and the
// line is rewritten with its direction flipped. A reloaded line that
// gains nothing is not written again. ev_backup marks the first
// instruction added to a reloaded line.
//
// flush finalizes the current line (next address = after its last
// instruction); the core raises it whenever a stored line preempts the
// scalar path. invalidate drops everything. Lines covering fewer than
// two instructions are never written.
//
// Output: at most one line per cycle on wr_* (write port of the shadow
// cache, tagged by the line's start address), plus event pulses.
module fill_unit
  import fu_pkg::*;
#(
  parameter bit TREE = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_pc,
  input  dec_t          in_dec,
  input  logic          in_taken,     // in_dec is a branch and was taken
  input  logic          flush,
  input  logic          resume,       // reload a reissued tree-like line
  input  logic [AW-1:0] resume_addr,
  input  sline_t        resume_line,
  input  logic          resume_dir,   // path issued (the one to extend)
  input  logic          invalidate,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output sline_t        wr_line,
  output logic          ev_fin_branch,
  output logic          ev_fin_dep,
  output logic          ev_fin_unit,
  output logic          ev_fin_port,
  output logic          ev_fin_flush,
  output logic          ev_ds_split,
  output logic          ev_discard,
  output logic          ev_backup
);

  // line under construction (the path being followed)
  line_t         cur_q, cur_d;
  logic [AW-1:0] start_q, start_d;
  logic [AW-1:0] exp_q, exp_d;        // address expected next
  // tree-like line: frozen copy of the path not followed
  logic          tree_q, tree_d;
  logic          dir_q, dir_d;
  line_t         alt_q, alt_d;
  // the current line was reloaded from the shadow cache and is unchanged
  logic          rs_q, rs_d;
  // branch waiting for its delay slot
  logic          pb_v_q, pb_v_d;
  dec_t          pb_q, pb_d;
  logic [AW-1:0] pb_pc_q, pb_pc_d;
  logic          pb_tk_q, pb_tk_d;
  // branch + delay-slot line waiting for the write port (TREE = 0)
  logic          hold_v_q, hold_v_d;
  sline_t        hold_q, hold_d;
  logic [AW-1:0] hold_a_q, hold_a_d;

  place_t        p_nb, p_br, p_ds, f_br, f_ds, p_new;
  logic          emit;
  sline_t        emit_line;
  logic [AW-1:0] emit_addr;
  fin_e          emit_why;
  logic          fork_ok;              // the held branch may fork the line

  // sequencing fields of a line completed by branch b at address bpc
  function automatic line_t close_branch(input line_t l, input dec_t b, input logic [AW-1:0] bpc);
    line_t o;
    o = l;
    o.br_addr   = b.target;
    o.next_addr = br_op_e'(b.fn) == BR_J ? b.target : bpc + AW'(2);
    return o;
  endfunction

  // the stored form of the current line, ending before address nxt
  function automatic sline_t pack(input line_t c, input logic [AW-1:0] nxt, input logic tr,
                                  input logic d, input line_t alt);
    sline_t s;
    line_t  f;
    f = c;
    f.next_addr = nxt;
    s.tree = tr;
    s.dir  = tr && d;
    s.part = '0;
    if (tr) begin
      s.part[d]  = f;
      s.part[!d] = alt;
    end else
      s.part[0] = f;
    return s;
  endfunction

  // a forked line: both paths hold everything up to the delay slot
  function automatic line_t alt_path(input line_t l, input dec_t b, input logic [AW-1:0] bpc,
                                     input logic tk);
    line_t o;
    o = l;
    o.br_addr   = b.target;
    o.next_addr = tk ? bpc + AW'(2) : b.target;
    return o;
  endfunction

  assign fork_ok = TREE && br_op_e'(pb_q.fn) != BR_J && br_op_e'(pb_q.fn) != BR_JR;

  always_comb begin
    cur_d     = cur_q;
    start_d   = start_q;
    exp_d     = exp_q;
    tree_d    = tree_q;
    dir_d     = dir_q;
    alt_d     = alt_q;
    pb_v_d    = pb_v_q;
    pb_d      = pb_q;
    pb_pc_d   = pb_pc_q;
    pb_tk_d   = pb_tk_q;
    hold_v_d  = 1'b0;
    hold_d    = hold_q;
    hold_a_d  = hold_a_q;
    emit      = 1'b0;
    emit_line = pack(cur_q, exp_q, tree_q, dir_q, alt_q);
    emit_addr = start_q;
    emit_why  = FIN_NONE;
    ev_ds_split = 1'b0;
    ev_backup   = 1'b0;
    rs_d        = 1'b0;

    p_nb  = try_place(cur_q, in_dec);
    p_br  = try_place(cur_q, pb_q);
    p_ds  = try_place(p_br.line, in_dec);
    f_br  = try_place(empty_line(), pb_q);
    f_ds  = try_place(f_br.line, in_dec);
    p_new = try_place(empty_line(), in_dec);

    if (invalidate) begin
      cur_d  = empty_line();
      tree_d = 1'b0;
      pb_v_d = 1'b0;
    end else if (flush) begin
      if (cur_q.ninstr != 0) begin
        emit     = 1'b1;
        emit_why = FIN_FLUSH;
      end
      cur_d  = empty_line();
      tree_d = 1'b0;
      pb_v_d = 1'b0;
      if (TREE && resume && resume_line.tree) begin
        // back up: continue the path just reissued after a misprediction
        cur_d   = resume_line.part[resume_dir];
        alt_d   = resume_line.part[!resume_dir];
        tree_d  = 1'b1;
        dir_d   = resume_dir;
        start_d = resume_addr;
        exp_d   = resume_line.part[resume_dir].next_addr;
        rs_d    = 1'b1;
      end
    end else if (in_valid) begin
      if (cur_q.ninstr != 0 && in_pc != exp_q && !pb_v_q) begin
        // out-of-sequence input (should not occur): close and restart
        emit      = 1'b1;
        emit_why  = FIN_OTHER;
        cur_d     = p_new.ok ? p_new.line : empty_line();
        tree_d    = 1'b0;
        start_d   = in_pc;
        pb_v_d    = 1'b0;
      end else if (pb_v_q) begin
        // in_dec is the delay slot of the held branch
        pb_v_d = 1'b0;
        cur_d  = empty_line();
        if (p_br.ok && p_ds.ok) begin
          if (fork_ok) begin
            cur_d  = p_ds.line;
            alt_d  = alt_path(p_ds.line, pb_q, pb_pc_q, pb_tk_q);
            tree_d = 1'b1;
            dir_d  = pb_tk_q;
            if (cur_q.ninstr == 0) start_d = pb_pc_q;
          end else begin
            emit      = 1'b1;
            emit_line = pack(close_branch(p_ds.line, pb_q, pb_pc_q),
                             close_branch(p_ds.line, pb_q, pb_pc_q).next_addr, 1'b0, 1'b0, alt_q);
            emit_addr = cur_q.ninstr != 0 ? start_q : pb_pc_q;
            emit_why  = FIN_BRANCH;
          end
        end else begin
          if (cur_q.ninstr != 0) begin
            emit      = 1'b1;
            emit_line = pack(cur_q, pb_pc_q, 1'b0, 1'b0, alt_q);
            emit_why  = !p_br.ok ? p_br.why : p_ds.why;
          end
          if (f_br.ok && f_ds.ok) begin
            ev_ds_split = 1'b1;
            if (fork_ok) begin
              cur_d   = f_ds.line;
              alt_d   = alt_path(f_ds.line, pb_q, pb_pc_q, pb_tk_q);
              tree_d  = 1'b1;
              dir_d   = pb_tk_q;
              start_d = pb_pc_q;
            end else begin
              hold_v_d = 1'b1;
              hold_d   = pack(close_branch(f_ds.line, pb_q, pb_pc_q),
                              close_branch(f_ds.line, pb_q, pb_pc_q).next_addr, 1'b0, 1'b0, alt_q);
              hold_a_d = pb_pc_q;
            end
          end
        end
      end else if (in_dec.uc == UC_BR) begin
        if (tree_q) begin
          // one branch per line: the tree-like line ends here
          emit      = 1'b1;
          emit_line = pack(cur_q, in_pc, 1'b1, dir_q, alt_q);
          emit_why  = FIN_BRANCH;
          cur_d     = empty_line();
          tree_d    = 1'b0;
        end
        pb_v_d  = 1'b1;
        pb_d    = in_dec;
        pb_pc_d = in_pc;
        pb_tk_d = in_taken;
        if (cur_q.ninstr == 0 || tree_q) start_d = in_pc;
      end else if (p_nb.ok && cur_q.ninstr != 0) begin
        cur_d     = p_nb.line;
        ev_backup = rs_q;
      end else begin
        if (cur_q.ninstr != 0) begin
          emit      = 1'b1;
          emit_line = pack(cur_q, in_pc, tree_q, dir_q, alt_q);
          emit_why  = p_nb.why;
        end
        cur_d   = p_new.ok ? p_new.line : empty_line();
        tree_d  = 1'b0;
        start_d = in_pc;
      end
      exp_d = in_pc + AW'(1);
      // after a delay slot the line (if forked) continues where the
      // program went
      if (pb_v_q && pb_tk_q) exp_d = pb_q.target;
    end
    // a reloaded line that gained nothing is already in the shadow cache
    if (rs_q) emit = 1'b0;
  end

  // write port: the held branch line has priority; a line is written
  // only when it covers two or more instructions
  logic [2:0] emit_n;
  assign emit_n = emit_line.part[emit_line.dir].ninstr;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = emit_addr;
    wr_line = emit_line;
    ev_discard = 1'b0;
    if (hold_v_q && !invalidate) begin
      wr_en   = 1'b1;
      wr_addr = hold_a_q;
      wr_line = hold_q;
    end else if (emit) begin
      wr_en      = emit_n >= 3'd2;
      ev_discard = emit_n < 3'd2;
    end
  end

  assign ev_fin_branch = emit && emit_why == FIN_BRANCH || ev_ds_split;
  assign ev_fin_dep    = emit && emit_why == FIN_DEP;
  assign ev_fin_unit   = emit && emit_why == FIN_UNIT;
  assign ev_fin_port   = emit && emit_why == FIN_PORT;
  assign ev_fin_flush  = emit && emit_why == FIN_FLUSH;

  // the emit path and the hold path never coincide: the cycle after a
  // split the current line is empty, so no line can be finalized
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
                                !(hold_v_q && emit && emit_n >= 3'd2))
    else $error("fill_unit: two lines finalized for one write port");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q    <= '0;
      start_q  <= '0;
      exp_q    <= '0;
      tree_q   <= 1'b0;
      dir_q    <= 1'b0;
      alt_q    <= '0;
      rs_q     <= 1'b0;
      pb_v_q   <= 1'b0;
      pb_q     <= '0;
      pb_pc_q  <= '0;
      pb_tk_q  <= 1'b0;
      hold_v_q <= 1'b0;
      hold_q   <= '0;
      hold_a_q <= '0;
    end else begin
      cur_q    <= cur_d;
      start_q  <= start_d;
      exp_q    <= exp_d;
      tree_q   <= tree_d;
      dir_q    <= dir_d;
      alt_q    <= alt_d;
      rs_q     <= rs_d;
      pb_v_q   <= pb_v_d;
      pb_q     <= pb_d;
      pb_pc_q  <= pb_pc_d;
      pb_tk_q  <= pb_tk_d;
      hold_v_q <= hold_v_d;
      hold_q   <= hold_d;
      hold_a_q <= hold_a_d;
    end
  end

endmodule
