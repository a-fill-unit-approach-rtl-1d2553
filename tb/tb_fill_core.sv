// tb_fill_core: end-to-end test of the processor at its default size
// (65536-entry shadow cache).
//
// Two copies of the core run the same program from the same instruction
// memory, each with its own data memory: one with the fill unit and
// shadow cache active, one held in scalar-only mode. An instruction-set
// model in this testbench (MIPS semantics with delayed branches) runs the
// program as well. At the end the data memories of both cores must equal
// the model's, both cores must have retired exactly the model's
// instruction count, the scalar core must have taken one cycle per
// instruction, and the fill-unit core must have taken fewer cycles.
// Halfway through, the shadow cache of the fill core is invalidated once,
// as software does before running modified code.
//
// The program is a nested loop written so that the fill unit meets every
// rule it has: int_1 -> int_2 cascade, store value from int_2 and from
// int_1, store -> load forwarding and a double store to one word inside
// a line, a busy-unit finalization, read-port exhaustion ahead of a
// branch (so the branch and delay slot get a line of their own), a
// branch whose delay slot fits in the line, JAL/JR, a floating-point
// operation and a BREAK at the end. The core uses tree-like lines (the
// default), so loop branches are issued from forked lines, some of them
// down the wrong path (squash, reissue, back-up filling). Each event is
// counted and must occur.
module tb_fill_core;
  import fu_pkg::*;
  import asm_pkg::*;

  localparam int IW = 64;      // instruction words
  localparam int DW = 4096;    // data words

  logic clk = 0, rst_n = 0;
  logic inval = 0;
  logic [31:0] imem [IW];

  // per-core memories and ports
  logic [31:0] dm_f [DW];
  logic [31:0] dm_s [DW];
  logic [31:0] dm_m [DW];       // model

  logic [AW-1:0] ia_f, ia_s, pc_f, pc_s;
  logic [29:0]   a1_f, a2_f, a1_s, a2_s;
  logic          w1_f, w2_f, w1_s, w2_s;
  logic [31:0]   wd1_f, wd2_f, wd1_s, wd2_s;
  logic          fv_f, fv_s, h_f, h_s, e_f, e_s;
  logic [25:0]   fo_f, fo_s;
  logic [2:0]    r_f, r_s;
  events_t       ev_f, ev_s;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fill_core u_fill (
    .clk, .rst_n, .scalar_only(1'b0), .shadow_inval(inval),
    .imem_addr(ia_f), .imem_rdata(imem[ia_f[5:0]]),
    .d1_addr(a1_f), .d1_we(w1_f), .d1_wdata(wd1_f), .d1_rdata(dm_f[a1_f[11:0]]),
    .d2_addr(a2_f), .d2_we(w2_f), .d2_wdata(wd2_f), .d2_rdata(dm_f[a2_f[11:0]]),
    .fpu_valid(fv_f), .fpu_op(fo_f), .pc(pc_f), .halted(h_f), .error(e_f), .retired(r_f), .ev(ev_f)
  );
  fill_core u_scal (
    .clk, .rst_n, .scalar_only(1'b1), .shadow_inval(1'b0),
    .imem_addr(ia_s), .imem_rdata(imem[ia_s[5:0]]),
    .d1_addr(a1_s), .d1_we(w1_s), .d1_wdata(wd1_s), .d1_rdata(dm_s[a1_s[11:0]]),
    .d2_addr(a2_s), .d2_we(w2_s), .d2_wdata(wd2_s), .d2_rdata(dm_s[a2_s[11:0]]),
    .fpu_valid(fv_s), .fpu_op(fo_s), .pc(pc_s), .halted(h_s), .error(e_s), .retired(r_s), .ev(ev_s)
  );

  always @(posedge clk) begin
    if (w1_f) dm_f[a1_f[11:0]] <= wd1_f;
    if (w2_f) dm_f[a2_f[11:0]] <= wd2_f;
    if (w1_s) dm_s[a1_s[11:0]] <= wd1_s;
    if (w2_s) dm_s[a2_s[11:0]] <= wd2_s;
  end

  // statistics
  int cyc_f = 0, cyc_s = 0, ret_f = 0, ret_s = 0, fpu_f = 0, fpu_s = 0;
  int n_ev [19];
  always @(posedge clk) if (rst_n) begin
    if (!h_f) cyc_f++;
    if (!h_s) cyc_s++;
    ret_f += int'(r_f);
    ret_s += int'(r_s);
    fpu_f += int'(fv_f);
    fpu_s += int'(fv_s);
    for (int k = 0; k < 19; k++) n_ev[k] += int'(ev_f[18 - k]);
  end

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------------------------------------------------- program
  task automatic load_program();
    for (int k = 0; k < IW; k++) imem[k] = nop();
    imem[0]  = lui(29, 0);
    imem[1]  = ori(29, 29, 16'h1000);
    imem[2]  = ori(18, 0, 16'h2000);
    imem[3]  = addiu(9, 0, 3);            // outer count
    imem[4]  = addiu(2, 0, 3);
    imem[5]  = addiu(12, 0, 5);
    imem[6]  = addiu(13, 0, 7);
    imem[7]  = addiu(15, 0, 11);
    imem[8]  = addiu(16, 0, 13);
    imem[9]  = addiu(17, 0, 17);
    imem[10] = addiu(10, 0, 8);           // outer: inner count
    imem[11] = addu(1, 1, 2);             // inner:
    imem[12] = addu(4, 1, 10);            //   cascade from int_1
    imem[13] = sw(4, 0, 29);              //   value from int_2
    imem[14] = lw(5, 0, 29);              //   store -> load forwarding
    imem[15] = add_s(1, 2, 3);            //   fpu
    imem[16] = slt(6, 5, 2);              //   no integer unit left
    imem[17] = addiu(10, 10, -1);
    imem[18] = sw(6, 4, 29);              //   value from int_1
    imem[19] = sw(5, 4, 29);              //   same word: later store wins
    imem[20] = lw(7, 8, 29);              //   no ld/st unit left
    imem[21] = addu(11, 12, 13);
    imem[22] = addu(14, 15, 16);
    imem[23] = sw(17, 12, 18);            //   seven ports in use
    imem[24] = bne(10, 19, -14);          //   needs two more: out of ports
    imem[25] = addiu(29, 29, 16);         //   delay slot
    imem[26] = jal(40);
    imem[27] = nop();
    imem[28] = addiu(9, 9, -1);
    imem[29] = bgtz(9, -20);
    imem[30] = addu(12, 12, 11);          //   delay slot
    imem[31] = sw(20, 0, 18);
    imem[32] = sw(21, 4, 18);
    imem[33] = sw(1, 8, 18);
    imem[34] = sw(12, 16, 18);
    imem[35] = sw(14, 20, 18);
    imem[36] = sw(7, 24, 18);
    imem[37] = brk();
    imem[40] = addu(20, 1, 1);            // function
    imem[41] = jr(31);
    imem[42] = addiu(21, 20, 1);          //   delay slot
  endtask

  // ---------------------------------------------------- reference model
  int model_count, model_fpu;
  task automatic run_model();
    logic [31:0] r [32];
    logic [AW-1:0] pcm, npc, after;
    logic [31:0] w, a, b, res;
    logic ds;
    int steps;
    for (int k = 0; k < 32; k++) r[k] = 0;
    pcm = 0; ds = 0; after = 0; model_count = 0; model_fpu = 0; steps = 0;
    while (steps < 100000) begin
      logic [5:0] op, fn;
      logic [4:0] rs, rt, rd, sh;
      logic [31:0] se;
      logic is_br, tk;
      logic [AW-1:0] tgt;
      steps++;
      w = imem[pcm[5:0]];
      op = w[31:26]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11]; sh = w[10:6]; fn = w[5:0];
      se = {{16{w[15]}}, w[15:0]};
      a = r[rs]; b = r[rt];
      is_br = 0; tk = 0; tgt = 0;
      if (w == brk()) break;
      model_count++;
      case (op)
        6'h00: case (fn)
          6'h00: r[rd] = b << sh;
          6'h02: r[rd] = b >> sh;
          6'h03: r[rd] = 32'(int'(b) >>> sh);
          6'h04: r[rd] = b << a[4:0];
          6'h08: begin is_br = 1; tk = 1; tgt = a[31:2]; end
          6'h09: begin is_br = 1; tk = 1; tgt = a[31:2]; r[rd] = {pcm + AW'(2), 2'b00}; end
          6'h21: r[rd] = a + b;
          6'h23: r[rd] = a - b;
          6'h24: r[rd] = a & b;
          6'h25: r[rd] = a | b;
          6'h26: r[rd] = a ^ b;
          6'h27: r[rd] = ~(a | b);
          6'h2A: r[rd] = int'(a) < int'(b) ? 1 : 0;
          6'h2B: r[rd] = a < b ? 1 : 0;
          default: ;
        endcase
        6'h02, 6'h03: begin is_br = 1; tk = 1; tgt = {pcm[AW-1:26], w[25:0]};
                       if (op == 6'h03) r[31] = {pcm + AW'(2), 2'b00}; end
        6'h04: begin is_br = 1; tk = a == b; end
        6'h05: begin is_br = 1; tk = a != b; end
        6'h06: begin is_br = 1; tk = int'(a) <= 0; end
        6'h07: begin is_br = 1; tk = int'(a) > 0; end
        6'h09: r[rt] = a + se;
        6'h0A: r[rt] = int'(a) < int'(se) ? 1 : 0;
        6'h0C: r[rt] = a & {16'h0, w[15:0]};
        6'h0D: r[rt] = a | {16'h0, w[15:0]};
        6'h0F: r[rt] = {w[15:0], 16'h0};
        6'h11: model_fpu++;
        6'h23: begin res = a + se; r[rt] = dm_m[res[13:2]]; end
        6'h2B: begin res = a + se; dm_m[res[13:2]] = b; end
        default: ;
      endcase
      r[0] = 0;
      if (is_br && op inside {6'h04, 6'h05, 6'h06, 6'h07}) tgt = pcm + AW'(1) + AW'(signed'(w[15:0]));
      npc = pcm + AW'(1);
      if (ds) npc = after;
      ds = 0;
      if (is_br) begin ds = 1; after = tk ? tgt : pcm + AW'(2); end
      pcm = npc;
    end
  endtask

  // ------------------------------------------------------------- run
  string ev_name [19] = '{"shadow_issue", "scalar_issue", "line_write", "fin_branch", "fin_dep",
                         "fin_unit", "fin_port", "fin_flush", "ds_split", "discard", "fwd_int1",
                         "fwd_store", "ls_raw", "ls_waw", "taken", "fpu_issue", "tree_issue",
                         "mispredict", "backup"};
  initial begin
    load_program();
    for (int k = 0; k < DW; k++) begin dm_f[k] = 0; dm_s[k] = 0; dm_m[k] = 0; end
    for (int k = 0; k < 19; k++) n_ev[k] = 0;
    run_model();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // invalidate the shadow cache once, in the middle of the run
    repeat (60) @(posedge clk);
    @(negedge clk) inval = 1;
    @(negedge clk) inval = 0;
    wait (h_f && h_s);
    @(posedge clk); #1;
    checks++; if (e_f || e_s) begin failures++; $display("core reported an unsupported instruction"); end
    for (int k = 0; k < DW; k++) begin
      checks++;
      if (dm_f[k] !== dm_m[k] || dm_s[k] !== dm_m[k]) begin
        failures++;
        $display("dmem[%0d]: fill %h scalar %h model %h", k, dm_f[k], dm_s[k], dm_m[k]);
      end
    end
    checks++; if (ret_f != model_count || ret_s != model_count) begin failures++;
      $display("retired fill %0d scalar %0d model %0d", ret_f, ret_s, model_count); end
    checks++; if (fpu_f != model_fpu || fpu_s != model_fpu) begin failures++;
      $display("fpu ops fill %0d scalar %0d model %0d", fpu_f, fpu_s, model_fpu); end
    // scalar path: one instruction per cycle (BREAK takes the last cycle)
    checks++; if (cyc_s != model_count + 1) begin failures++;
      $display("scalar cycles %0d, expected %0d", cyc_s, model_count + 1); end
    // fill core: one group per cycle
    checks++; if (cyc_f != n_ev[0] + n_ev[1] + 1) begin failures++;
      $display("fill cycles %0d, groups %0d", cyc_f, n_ev[0] + n_ev[1]); end
    checks++; if (cyc_f >= cyc_s) begin failures++; $display("no speed-up"); end
    for (int k = 0; k < 19; k++) begin
      $display("  %-13s %0d", ev_name[k], n_ev[k]);
      checks++;
      if (n_ev[k] == 0) begin failures++; $display("mechanism never exercised: %s", ev_name[k]); end
    end
    $display("instructions %0d  scalar cycles %0d (IPC %.2f)  fill cycles %0d (IPC %.2f)",
             model_count, cyc_s, real'(model_count) / cyc_s, cyc_f, real'(model_count) / cyc_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
