// fill_core: a MIPS-subset processor with an instruction fill unit and a
// shadow cache.
//
// Every cycle the core issues one group. The fetch address is presented
// to the shadow cache and to the normal instruction cache together. On a
// shadow-cache hit the stored line is issued: up to six instructions go
// to int_1, int_2, ld/st_1, ld/st_2, the branch unit and the fpu in the
// same cycle, and the scalar path is preempted (the fill unit is told to
// close its line). On a miss the i-cache word is decoded and issued alone
// through the same datapath (as a one-instruction group), and the fill
// unit receives it to pack into the line it is building; finished lines
// go into the shadow cache for the next time the code runs.
//
// A group reads its operands from the eight read ports named in the line
// (port table), int_1's result is forwarded to the other units of the
// group, memory and register writes complete at the end of the cycle,
// and the branch unit produces the next fetch address. Each group thus
// takes one clock cycle from fetch to write-back; the pipeline of the
// original machine is collapsed into a single stage in this design, so
// there are no interlocks, and a branch needs predicting only to choose
// between the two paths of a tree-like line.
//
// Tree-like lines (TREE = 1): a stored line may carry both paths past a
// conditional branch. The path named by the line's direction bit is
// issued; it already runs past the branch, so the next fetch address is
// that path's next_addr. If the branch unit finds the other direction,
// the group is squashed (no register, memory or fpu effect) and the
// other path of the same line is issued in the next cycle: one cycle
// lost. The direction bit is then updated, and the fill unit reloads the
// line so that a short reissued path can be extended from the i-cache.
//
// MIPS delayed branches: a group built by the fill unit always holds a
// branch together with its delay slot, so its next address is final. A
// branch issued on the scalar path makes the core fetch the delay slot
// next from the i-cache (no shadow lookup) and then jump to the address
// the branch unit computed.
//
// Interfaces: the i-cache and data cache are external, combinational
// read and write-on-clock-edge (perfect caches). The floating-point unit
// is external: fpu_valid/fpu_op carry the operation (COP1 bits 25:0).
// TREE selects tree-like lines (1, default) or simple lines (0).
// scalar_only disables shadow-cache issue (plain single-issue machine);
// shadow_inval invalidates the whole shadow cache. halted rises on BREAK
// (error also set for an unsupported instruction) and stays high.
// retired gives the number of instructions completed this cycle and ev
// one pulse per event for statistics.
module fill_core
  import fu_pkg::*;
#(
  parameter int            SC_ENTRIES = 65536,
  parameter bit            TREE       = 1'b1,
  parameter logic [AW-1:0] RESET_PC   = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          scalar_only,
  input  logic          shadow_inval,
  // instruction cache
  output logic [AW-1:0] imem_addr,
  input  logic [31:0]   imem_rdata,
  // data cache, one port per load/store unit
  output logic [29:0]   d1_addr,
  output logic          d1_we,
  output logic [31:0]   d1_wdata,
  input  logic [31:0]   d1_rdata,
  output logic [29:0]   d2_addr,
  output logic          d2_we,
  output logic [31:0]   d2_wdata,
  input  logic [31:0]   d2_rdata,
  // floating-point unit
  output logic          fpu_valid,
  output logic [25:0]   fpu_op,
  // status
  output logic [AW-1:0] pc,
  output logic          halted,
  output logic          error,
  output logic [2:0]    retired,
  output events_t       ev
);

  logic [AW-1:0] pc_q;
  logic          ds_q;          // next scalar instruction is a delay slot
  logic [AW-1:0] ds_tgt_q;      // where to go after it
  logic          halt_q, err_q;

  logic          sc_hit, use_sc;
  sline_t        sc_line;
  logic          sc_pred;
  line_t         sl, grp;
  logic          sel;           // path of a tree-like line being issued
  logic          retry_q, retry_sel_q;
  logic          mispred, commit;
  logic [31:0]   y1, y2, ld1, ld2;
  logic          ls_raw, ls_waw;
  logic          br_taken;
  logic [AW-1:0] br_next;
  logic [31:0]   link;
  logic          live;
  dec_t          dec;
  place_t        scal;
  logic          fw_en;         // fill unit -> shadow cache write
  logic [AW-1:0] fw_addr;
  sline_t        fw_line;

  // ------------------------------------------------------------ fetch
  assign imem_addr = pc_q;

  shadow_cache #(.ENTRIES(SC_ENTRIES)) u_sc (
    .clk, .rst_n,
    .rd_addr   (pc_q),
    .hit       (sc_hit),
    .rd_line   (sc_line),
    .rd_pred   (sc_pred),
    .wr_en     (fw_en),
    .wr_addr   (fw_addr),
    .wr_line   (fw_line),
    .upd_en    (use_sc && sc_line.tree),
    .upd_addr  (pc_q),
    .upd_dir   (br_taken),
    .invalidate(shadow_inval)
  );

  mips_decoder u_dec (.instr(imem_rdata), .pc(pc_q), .dec);

  assign use_sc = sc_hit && !ds_q && !scalar_only && !halt_q;

  // the scalar instruction as a one-instruction group
  always_comb begin
    scal = try_place(empty_line(), dec);
    sl   = scal.line;
    sl.br_addr   = dec.target;
    sl.next_addr = dec.uc == UC_BR && br_op_e'(dec.fn) == BR_J ? dec.target
                 : dec.uc == UC_BR ? pc_q + AW'(2) : pc_q + AW'(1);
    if (!scal.ok) sl = empty_line();
  end

  assign sel = !sc_line.tree ? 1'b0 : retry_q ? retry_sel_q : sc_pred;
  assign grp = use_sc ? sc_line.part[sel] : sl;

  // --------------------------------------------------------- fill unit
  fill_unit #(.TREE(TREE)) u_fill (
    .clk, .rst_n,
    .in_taken     (br_taken),
    .in_valid     (!use_sc && !halt_q && !scalar_only),
    .in_pc        (pc_q),
    .in_dec       (dec),
    .flush        (use_sc),
    .resume       (use_sc && retry_q),
    .resume_addr  (pc_q),
    .resume_line  (sc_line),
    .resume_dir   (sel),
    .invalidate   (shadow_inval),
    .wr_en        (fw_en),
    .wr_addr      (fw_addr),
    .wr_line      (fw_line),
    .ev_fin_branch(ev.fin_branch),
    .ev_fin_dep   (ev.fin_dep),
    .ev_fin_unit  (ev.fin_unit),
    .ev_fin_port  (ev.fin_port),
    .ev_fin_flush (ev.fin_flush),
    .ev_ds_split  (ev.ds_split),
    .ev_discard   (ev.discard),
    .ev_backup    (ev.backup)
  );

  // ------------------------------------------------------ register file
  logic [NPORTS-1:0][4:0]  rf_ra;
  logic [NPORTS-1:0][31:0] rf_rd;
  logic [NWR-1:0]          rf_we;
  logic [NWR-1:0][4:0]     rf_wa;
  logic [NWR-1:0][31:0]    rf_wd;

  always_comb
    for (int p = 0; p < NPORTS; p++) rf_ra[p] = grp.port_used[p] ? grp.port_reg[p] : 5'd0;

  regfile #(.NR(NPORTS), .NW(NWR)) u_rf (
    .clk, .rst_n,
    .raddr(rf_ra), .rdata(rf_rd),
    .we(rf_we), .waddr(rf_wa), .wdata(rf_wd)
  );

  // ------------------------------------------------------------ units

  assign live    = !halt_q;
  assign mispred = use_sc && sc_line.tree && br_taken != sel;
  assign commit  = live && !mispred;

  function automatic logic [31:0] opnd(input src_t s, input logic [NPORTS-1:0][31:0] rd,
                                       input logic [31:0] i1, input logic [31:0] i2);
    unique case (s.sel)
      SRC_PORT: return rd[s.port];
      SRC_INT1: return i1;
      SRC_INT2: return i2;
      default:  return 32'h0;
    endcase
  endfunction

  function automatic logic [31:0] opnd_b(input slot_t s, input logic [NPORTS-1:0][31:0] rd,
                                         input logic [31:0] i1);
    return s.use_imm ? s.imm : opnd(s.b, rd, i1, 32'h0);
  endfunction

  int_alu u_int1 (
    .op(grp.slot[S_INT1].fn),
    .a (opnd(grp.slot[S_INT1].a, rf_rd, 32'h0, 32'h0)),
    .b (grp.slot[S_INT1].use_imm ? grp.slot[S_INT1].imm : opnd(grp.slot[S_INT1].b, rf_rd, 32'h0, 32'h0)),
    .y (y1)
  );

  int_alu u_int2 (
    .op(grp.slot[S_INT2].fn),
    .a (opnd(grp.slot[S_INT2].a, rf_rd, y1, 32'h0)),
    .b (opnd_b(grp.slot[S_INT2], rf_rd, y1)),
    .y (y2)
  );

  lsu_pair u_lsu (
    .v1          (commit && grp.slot[S_LS1].valid),
    .st1         (ls_op_e'(grp.slot[S_LS1].fn) == LS_SW),
    .base1       (opnd(grp.slot[S_LS1].a, rf_rd, y1, y2)),
    .off1        (grp.slot[S_LS1].imm),
    .sd1         (opnd(grp.slot[S_LS1].b, rf_rd, y1, y2)),
    .v2          (commit && grp.slot[S_LS2].valid),
    .st2         (ls_op_e'(grp.slot[S_LS2].fn) == LS_SW),
    .base2       (opnd(grp.slot[S_LS2].a, rf_rd, y1, y2)),
    .off2        (grp.slot[S_LS2].imm),
    .sd2         (opnd(grp.slot[S_LS2].b, rf_rd, y1, y2)),
    .sd2_from_ls1(grp.slot[S_LS2].b.sel == SRC_LS1),
    .d1_addr, .d1_we, .d1_wdata, .d1_rdata,
    .d2_addr, .d2_we, .d2_wdata, .d2_rdata,
    .ld1, .ld2,
    .raw_fwd     (ls_raw),
    .waw_hit     (ls_waw)
  );

  branch_unit u_br (
    .valid    (grp.slot[S_BR].valid),
    .op       (grp.slot[S_BR].fn),
    .a        (opnd(grp.slot[S_BR].a, rf_rd, y1, 32'h0)),
    .b        (opnd(grp.slot[S_BR].b, rf_rd, y1, 32'h0)),
    .link_val (grp.slot[S_BR].imm),
    .next_addr(grp.next_addr),
    .br_addr  (grp.br_addr),
    .taken    (br_taken),
    .next_pc  (br_next),
    .link_out (link)
  );

  assign fpu_valid = commit && grp.slot[S_FPU].valid;
  assign fpu_op    = grp.slot[S_FPU].imm[25:0];

  // ------------------------------------------------------ write-back
  always_comb begin
    rf_we[0] = commit && grp.slot[S_INT1].valid && grp.slot[S_INT1].rd_wr;
    rf_wa[0] = grp.slot[S_INT1].rd;
    rf_wd[0] = y1;
    rf_we[1] = commit && grp.slot[S_INT2].valid && grp.slot[S_INT2].rd_wr;
    rf_wa[1] = grp.slot[S_INT2].rd;
    rf_wd[1] = y2;
    rf_we[2] = commit && grp.slot[S_LS1].valid && grp.slot[S_LS1].rd_wr;
    rf_wa[2] = grp.slot[S_LS1].rd;
    rf_wd[2] = ld1;
    rf_we[3] = commit && grp.slot[S_LS2].valid && grp.slot[S_LS2].rd_wr;
    rf_wa[3] = grp.slot[S_LS2].rd;
    rf_wd[3] = ld2;
    rf_we[4] = commit && grp.slot[S_BR].valid && grp.slot[S_BR].rd_wr;
    rf_wa[4] = grp.slot[S_BR].rd;
    rf_wd[4] = link;
  end

  // ------------------------------------------------------- sequencing
  logic stop_now;
  assign stop_now = !use_sc && (dec.uc == UC_HALT || dec.uc == UC_NONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q     <= RESET_PC;
      ds_q     <= 1'b0;
      ds_tgt_q <= '0;
      retry_q  <= 1'b0;
      retry_sel_q <= 1'b0;
      halt_q   <= 1'b0;
      err_q    <= 1'b0;
    end else if (!halt_q) begin
      retry_q <= 1'b0;
      if (mispred) begin
        retry_q     <= 1'b1;         // same address, other path
        retry_sel_q <= !sel;
      end else if (use_sc) begin
        // a tree-like line's path already went past its branch
        pc_q <= sc_line.tree ? grp.next_addr : br_next;
      end else if (stop_now) begin
        halt_q <= 1'b1;
        err_q  <= dec.uc == UC_NONE;
      end else if (ds_q) begin
        pc_q <= ds_tgt_q;
        ds_q <= 1'b0;
      end else if (dec.uc == UC_BR) begin
        pc_q     <= pc_q + AW'(1);
        ds_q     <= 1'b1;
        ds_tgt_q <= br_next;
      end else begin
        pc_q <= pc_q + AW'(1);
      end
    end
  end

  assign pc      = pc_q;
  assign halted  = halt_q;
  assign error   = err_q;
  assign retired = !commit ? 3'd0 : use_sc ? grp.ninstr : (stop_now ? 3'd0 : 3'd1);

  // -------------------------------------------------------- events
  function automatic logic any_sel(input line_t l, input src_sel_e s);
    logic r;
    r = 1'b0;
    for (int i = 0; i < NSLOT; i++)
      if (l.slot[i].valid && (l.slot[i].a.sel == s || (!l.slot[i].use_imm && l.slot[i].b.sel == s)))
        r = 1'b1;
    return r;
  endfunction

  assign ev.shadow_issue = live && use_sc;
  assign ev.scalar_issue = live && !use_sc && !stop_now;
  assign ev.line_write   = fw_en;
  assign ev.fwd_int1     = commit && use_sc && any_sel(grp, SRC_INT1);
  assign ev.fwd_store    = commit && use_sc && (any_sel(grp, SRC_INT2) || any_sel(grp, SRC_LS1));
  assign ev.ls_raw       = commit && ls_raw;
  assign ev.ls_waw       = commit && ls_waw;
  assign ev.taken        = commit && br_taken;
  assign ev.fpu_issue    = fpu_valid;
  assign ev.tree_issue   = live && use_sc && sc_line.tree;
  assign ev.mispredict   = live && mispred;

endmodule
