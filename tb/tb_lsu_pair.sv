// tb_lsu_pair: the two load/store units against a small data memory.
// Random pairs of accesses, biased to collide on the same word, are
// checked against a sequential model (ld/st_1 before ld/st_2): load
// values, memory contents afterwards, RAW forwarding and WAW priority.
module tb_lsu_pair;
  logic clk = 0;
  logic v1, st1, v2, st2, sd2_from_ls1;
  logic [31:0] base1, off1, sd1, base2, off2, sd2;
  logic [29:0] d1_addr, d2_addr;
  logic d1_we, d2_we;
  logic [31:0] d1_wdata, d2_wdata, d1_rdata, d2_rdata, ld1, ld2;
  logic raw_fwd, waw_hit;
  logic [31:0] mem [16];
  logic [31:0] model [16];
  logic [31:0] e1, e2, exp_l1, exp_l2, sd2_eff;
  int checks = 0, failures = 0, n_raw = 0, n_waw = 0;
  always #5 clk = ~clk;
  lsu_pair dut (.*);
  assign d1_rdata = mem[d1_addr[3:0]];
  assign d2_rdata = mem[d2_addr[3:0]];
  always @(posedge clk) begin
    if (d1_we) mem[d1_addr[3:0]] <= d1_wdata;
    if (d2_we) mem[d2_addr[3:0]] <= d2_wdata;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < 16; k++) begin mem[k] = $urandom; model[k] = mem[k]; end
    for (int i = 0; i < 3000; i++) begin
      v1 = $urandom % 4 != 0; v2 = $urandom % 4 != 0;
      st1 = $urandom % 2; st2 = $urandom % 2;
      sd2_from_ls1 = !st1 && st2 && ($urandom % 3 == 0);
      base1 = 32'h100 + 4 * ($urandom % 4); off1 = 4 * ($urandom % 4);
      base2 = 32'h100 + 4 * ($urandom % 4); off2 = 4 * ($urandom % 4);
      sd1 = $urandom; sd2 = $urandom;
      e1 = (base1 + off1) >> 2; e2 = (base2 + off2) >> 2;
      // sequential reference
      exp_l1 = model[e1[3:0]];
      if (v1 && st1) model[e1[3:0]] = sd1;
      exp_l2 = model[e2[3:0]];
      sd2_eff = sd2_from_ls1 ? exp_l1 : sd2;
      if (v2 && st2) model[e2[3:0]] = sd2_eff;
      #1;
      if (v1 && !st1) begin checks++; if (ld1 !== exp_l1) begin failures++; $display("ld1 %h exp %h", ld1, exp_l1); end end
      if (v2 && !st2) begin checks++; if (ld2 !== exp_l2) begin failures++; $display("ld2 %h exp %h", ld2, exp_l2); end end
      if (raw_fwd) n_raw++;
      if (waw_hit) n_waw++;
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (mem[k] !== model[k]) begin failures++; $display("mem[%0d] %h exp %h", k, mem[k], model[k]); end
      end
    end
    checks++; if (n_raw == 0) failures++;
    checks++; if (n_waw == 0) failures++;
    $display("raw forwards %0d, waw collisions %0d", n_raw, n_waw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
