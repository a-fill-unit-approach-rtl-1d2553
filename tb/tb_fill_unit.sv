// tb_fill_unit: feeds short instruction sequences to the fill unit, one
// per cycle as the scalar path would, and checks the lines it writes:
// start address, instruction count, unit placement, operand sources,
// read-port sharing, sequencing fields and the reason each line closed.
// Covers both ways a branch and its delay slot are filled, the int_1
// cascade, store-value forwarding, WAW, unit and read-port exhaustion,
// preemption (flush) and the rule that one-instruction lines are dropped.
// A second instance with tree-like lines receives the same stream; its
// lines are checked for the fork after a conditional branch: both paths
// share the instructions up to the delay slot, the path followed goes on
// filling, and a second branch ends the line. Last, a tree-like line is
// reloaded as after a misprediction and its short path extended.
module tb_fill_unit;
  import fu_pkg::*;
  import asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, flush = 0, invalidate = 0, in_taken = 0;
  logic [AW-1:0] in_pc = 0;
  logic [31:0] word = 0;
  dec_t in_dec;
  logic wr_en;
  logic [AW-1:0] wr_addr;
  sline_t wr_line, t_line;
  logic t_en;
  logic [AW-1:0] t_addr;
  logic ev_fin_branch, ev_fin_dep, ev_fin_unit, ev_fin_port, ev_fin_flush, ev_ds_split, ev_discard;
  logic ev_backup, t_backup;
  logic resume = 0, resume_dir = 0;
  logic [AW-1:0] resume_addr = 0;
  sline_t resume_line = '0;
  int n_backup = 0;
  int checks = 0, failures = 0;
  int n_br = 0, n_dep = 0, n_unit = 0, n_port = 0, n_flush = 0, n_split = 0, n_disc = 0;
  logic [AW-1:0] wa_q [$];
  line_t wl_q [$];
  logic [AW-1:0] ta_q [$];
  sline_t tl_q [$];

  always #5 clk = ~clk;
  mips_decoder u_dec (.instr(word), .pc(in_pc), .dec(in_dec));
  fill_unit #(.TREE(1'b0)) dut (.*);
  fill_unit #(.TREE(1'b1)) dut_t (.clk, .rst_n, .in_valid, .in_pc, .in_dec, .in_taken, .flush, .invalidate,
    .resume, .resume_addr, .resume_line, .resume_dir, .ev_backup(t_backup),
    .wr_en(t_en), .wr_addr(t_addr), .wr_line(t_line), .ev_fin_branch(), .ev_fin_dep(), .ev_fin_unit(),
    .ev_fin_port(), .ev_fin_flush(), .ev_ds_split(), .ev_discard());

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin wa_q.push_back(wr_addr); wl_q.push_back(wr_line.part[0]); end
    if (t_en) begin ta_q.push_back(t_addr); tl_q.push_back(t_line); end
    n_br += int'(ev_fin_branch); n_dep += int'(ev_fin_dep); n_unit += int'(ev_fin_unit);
    n_port += int'(ev_fin_port); n_flush += int'(ev_fin_flush); n_split += int'(ev_ds_split);
    n_disc += int'(ev_discard);
    n_backup += int'(t_backup);
  end

  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic feed(input logic [AW-1:0] a, input logic [31:0] w, input logic tk = 0);
    @(negedge clk); in_valid = 1; in_pc = a; word = w; flush = 0; in_taken = tk;
    @(posedge clk); #1; in_valid = 0;
  endtask
  task automatic do_flush();
    @(negedge clk); flush = 1; @(posedge clk); #1; flush = 0;
    @(posedge clk); #1;
  endtask
  task automatic expect_cnt(input int n, input string what);
    checks++;
    if (wa_q.size() != n) begin failures++; $display("%s: %0d lines written, expected %0d", what, wa_q.size(), n); end
  endtask
  task automatic ck(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t l;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // A: E F BC DS fill one line (upper half of the delayed-branch case)
    feed(30'h10, addu(1, 2, 3));
    feed(30'h11, addu(4, 5, 6));
    feed(30'h12, beq(7, 8, 20));
    feed(30'h13, lw(9, 0, 10));
    @(posedge clk); #1;
    expect_cnt(1, "A");
    if (wa_q.size() == 1) begin
      l = wl_q[0];
      ck(wa_q[0] == 30'h10, "A start");
      ck(l.ninstr == 4, "A count");
      ck(l.slot[S_INT1].valid && l.slot[S_INT2].valid && l.slot[S_LS1].valid && l.slot[S_BR].valid, "A slots");
      ck(!l.slot[S_LS2].valid && !l.slot[S_FPU].valid, "A free slots");
      ck(l.next_addr == 30'h14 && l.br_addr == 30'h13 + 20, "A sequencing");
      ck($countones(l.port_used) == 7, "A ports");
      ck(l.slot[S_BR].a.sel == SRC_PORT && l.port_reg[l.slot[S_BR].a.port] == 7, "A branch port");
    end
    ck(n_br == 1, "A finalized by branch");
    wa_q.delete(); wl_q.delete();

    // B: delay slot finds no unit -> E F line, then BC+DS line
    feed(30'h20, addu(1, 2, 3));
    feed(30'h21, addu(4, 5, 6));
    feed(30'h22, bne(7, 0, -10));
    feed(30'h23, addiu(9, 9, 1));
    @(posedge clk); #1;
    expect_cnt(2, "B");
    if (wa_q.size() == 2) begin
      ck(wa_q[0] == 30'h20 && wl_q[0].ninstr == 2 && wl_q[0].next_addr == 30'h22, "B first line");
      ck(!wl_q[0].slot[S_BR].valid, "B first line has no branch");
      ck(wa_q[1] == 30'h22 && wl_q[1].ninstr == 2 && wl_q[1].next_addr == 30'h24, "B second line");
      ck(wl_q[1].br_addr == 30'h23 - 10 && wl_q[1].slot[S_BR].valid && wl_q[1].slot[S_INT1].valid, "B branch line");
    end
    ck(n_split == 1 && n_unit == 1, "B split and unit finalization");
    wa_q.delete(); wl_q.delete();

    // C: int_1 -> int_2 cascade, then RAW on int_2 closes the line
    feed(30'h30, addu(1, 2, 3));
    feed(30'h31, addu(4, 1, 5));
    feed(30'h32, lw(6, 4, 1));      // base from int_1: allowed
    feed(30'h33, lw(7, 0, 4));      // address needs int_2 result: RAW
    expect_cnt(1, "C");
    if (wa_q.size() == 1) begin
      l = wl_q[0];
      ck(l.ninstr == 3 && l.next_addr == 30'h33, "C count/next");
      ck(l.slot[S_INT2].a.sel == SRC_INT1 && l.slot[S_INT2].b.sel == SRC_PORT, "C cascade");
      ck(l.slot[S_LS1].a.sel == SRC_INT1, "C load address from int_1");
      ck($countones(l.port_used) == 3, "C ports (r2 r3 r5)");
    end
    ck(n_dep == 1, "C dependency finalization");
    do_flush();   // r7 line has one instruction: dropped
    ck(n_disc == 1 && wa_q.size() == 1, "C single line dropped");
    wa_q.delete(); wl_q.delete();

    // D: store value forwarding and WAW
    feed(30'h40, lw(1, 0, 2));
    feed(30'h41, sw(1, 4, 2));      // value from the load in ld/st_1, port shared (r2)
    feed(30'h42, addu(3, 4, 5));
    feed(30'h43, add_s(1, 2, 3));
    feed(30'h44, addiu(3, 0, 1));   // WAW on r3
    expect_cnt(1, "D");
    if (wa_q.size() == 1) begin
      l = wl_q[0];
      ck(l.ninstr == 4 && l.next_addr == 30'h44, "D count/next");
      ck(l.slot[S_LS2].b.sel == SRC_LS1, "D store value from load");
      ck(l.slot[S_LS2].a.sel == SRC_PORT && l.slot[S_LS2].a.port == l.slot[S_LS1].a.port, "D shared port");
      ck(l.slot[S_FPU].valid, "D fpu slot");
    end
    ck(n_dep == 2, "D WAW finalization");
    do_flush();
    wa_q.delete(); wl_q.delete();

    // E: read ports exhausted by the branch
    feed(30'h50, addu(1, 2, 3));
    feed(30'h51, sw(5, 0, 4));
    feed(30'h52, sw(7, 0, 6));
    feed(30'h53, addu(8, 9, 10));
    feed(30'h54, bne(11, 12, 5));
    feed(30'h55, nop());
    @(posedge clk); #1;
    expect_cnt(2, "E");
    if (wa_q.size() == 2) begin
      ck(wl_q[0].ninstr == 4 && wl_q[0].port_used == 8'hFF && wl_q[0].next_addr == 30'h54, "E full ports");
      ck(wa_q[1] == 30'h54 && wl_q[1].ninstr == 2, "E branch line");
    end
    ck(n_port == 1, "E port finalization");
    wa_q.delete(); wl_q.delete();

    // F: store value from int_2, three loads exhaust the units, flush
    feed(30'h60, addu(1, 2, 3));
    feed(30'h61, addu(4, 1, 1));
    feed(30'h62, sw(4, 0, 5));
    feed(30'h63, lw(6, 0, 5));
    feed(30'h64, lw(7, 4, 5));      // no ld/st unit left
    feed(30'h65, lw(8, 8, 5));
    do_flush();
    expect_cnt(2, "F");
    if (wa_q.size() == 2) begin
      ck(wl_q[0].slot[S_LS1].b.sel == SRC_INT2 && wl_q[0].ninstr == 4 && wl_q[0].next_addr == 30'h64, "F int_2 store value");
      ck(wa_q[1] == 30'h64 && wl_q[1].ninstr == 2 && wl_q[1].next_addr == 30'h66, "F flushed line");
    end
    ck(n_unit == 2 && n_flush >= 1, "F unit and flush finalizations");
    wa_q.delete(); wl_q.delete();

    // G: J with its delay slot; the target goes in next_addr
    feed(30'h70, addu(1, 2, 3));
    feed(30'h71, j(30'h200));
    feed(30'h72, addu(4, 5, 6));
    @(posedge clk); #1;
    expect_cnt(1, "G");
    if (wa_q.size() == 1) ck(wl_q[0].next_addr == 30'h200 && wl_q[0].ninstr == 3, "G jump line");
    do_flush();

    // tree-like instance, scenario A: forked line, untaken path followed
    checks++;
    if (ta_q.size() < 1 || ta_q[0] != 30'h10) begin failures++; $display("tree A missing"); end
    else begin
      sline_t t;
      t = tl_q[0];
      ck(t.tree && !t.dir, "tree A fork, untaken");
      ck(t.part[0].ninstr == 4 && t.part[1].ninstr == 4, "tree A both paths up to the delay slot");
      ck(t.part[0].next_addr == 30'h14 && t.part[1].next_addr == 30'h13 + 20, "tree A successors");
      ck(t.part[0].slot == t.part[1].slot, "tree A identical paths");
    end
    ta_q.delete(); tl_q.delete();

    // tree-like instance: taken branch, filling continues at the target
    feed(30'h80, addu(1, 2, 3));
    feed(30'h81, bne(1, 0, 16), 1'b1);
    feed(30'h82, addu(4, 1, 5));
    feed(30'h92, lw(6, 0, 7));
    feed(30'h93, sw(6, 4, 7));
    feed(30'h94, beq(8, 9, 3));      // second branch ends the line
    checks++;
    if (ta_q.size() != 1 || ta_q[0] != 30'h80) begin failures++; $display("tree T missing (%0d)", ta_q.size()); end
    else begin
      sline_t t;
      t = tl_q[0];
      ck(t.tree && t.dir, "tree T fork, taken");
      ck(t.part[1].ninstr == 5 && t.part[1].next_addr == 30'h94, "tree T taken path");
      ck(t.part[0].ninstr == 3 && t.part[0].next_addr == 30'h83, "tree T untaken path");
      ck(t.part[1].slot[S_LS2].b.sel == SRC_LS1 && t.part[1].slot[S_INT2].a.sel == SRC_INT1, "tree T forwarding");
      ck(!t.part[0].slot[S_LS1].valid, "tree T untaken path stops at the delay slot");

      // back-up: the line was mispredicted and reissued along the untaken
      // path; reloaded and flushed at once it is not written again
      ta_q.delete(); tl_q.delete();
      @(negedge clk); flush = 1; resume = 1; resume_addr = 30'h80; resume_line = t; resume_dir = 0;
      @(posedge clk); #1; flush = 0; resume = 0;
      do_flush();
      ck(ta_q.size() == 0, "tree B unchanged reloaded line not rewritten");
      // reloaded again, then the untaken path goes on from the i-cache
      @(negedge clk); flush = 1; resume = 1;
      @(posedge clk); #1; flush = 0; resume = 0;
      feed(30'h83, lw(10, 0, 11));
      feed(30'h84, sw(10, 4, 11));
      do_flush();
      ck(n_backup == 1, "tree B one back-up");
      if (ta_q.size() != 1 || ta_q[0] != 30'h80) begin
        checks++; failures++; $display("tree B missing (%0d)", ta_q.size());
      end else begin
        ck(tl_q[0].tree && !tl_q[0].dir, "tree B direction now untaken");
        ck(tl_q[0].part[0].ninstr == 5 && tl_q[0].part[0].next_addr == 30'h85, "tree B untaken path extended");
        ck(tl_q[0].part[0].slot[S_LS1].valid && tl_q[0].part[0].slot[S_LS2].valid, "tree B new slots");
        ck(tl_q[0].part[1] == t.part[1], "tree B taken path kept");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
