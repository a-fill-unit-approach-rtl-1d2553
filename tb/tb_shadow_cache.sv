// tb_shadow_cache: writes random lines at random start addresses and
// looks them up against a model; checks tag mismatch (aliasing entries),
// replacement, reset state and whole-cache invalidation. Runs at the
// default size of 65536 entries. Also checks the per-entry direction
// bit: set from the written line, changed by an update.
module tb_shadow_cache;
  import fu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic hit, wr_en, invalidate, rd_pred, upd_en, upd_dir;
  logic [AW-1:0] upd_addr;
  sline_t rd_line, wr_line;
  int checks = 0, failures = 0;
  localparam int N = 65536;
  logic [AW-1:0] addrs [64];
  sline_t lines [64];
  logic live [64];
  logic pexp [64];
  always #5 clk = ~clk;
  shadow_cache dut (.clk, .rst_n, .rd_addr, .hit, .rd_line, .rd_pred, .wr_en, .wr_addr, .wr_line,
                   .upd_en, .upd_addr, .upd_dir, .invalidate);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic sline_t rnd_line();
    sline_t l;
    for (int k = 0; k < $bits(sline_t); k += 32) l[k +: 32] = $urandom;
    return l;
  endfunction

  task automatic look(input int k);
    rd_addr = addrs[k]; #1;
    checks++;
    if (hit !== live[k] || (live[k] && (rd_line !== lines[k] || rd_pred !== pexp[k]))) begin
      failures++; $display("lookup %h: hit %b exp %b pred %b exp %b eq %b", addrs[k], hit, live[k], rd_pred, pexp[k], rd_line == lines[k]);
    end
  endtask

  initial begin
    wr_en = 0; invalidate = 0; upd_en = 0; upd_dir = 0; upd_addr = 0; rd_addr = 0; wr_addr = 0; wr_line = '0;
    for (int k = 0; k < 64; k++) begin
      addrs[k] = AW'($urandom);
      if (k % 8 == 1) addrs[k] = addrs[k-1] + AW'(N);   // same index, other tag
      lines[k] = rnd_line(); live[k] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 64; k++) look(k);            // nothing after reset
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = addrs[k]; wr_line = lines[k];
      @(posedge clk); #1; wr_en = 0;
      for (int m = 0; m < 64; m++)
        if (m != k && addrs[m][15:0] == addrs[k][15:0]) live[m] = 0;  // replaced
      live[k] = 1;
      pexp[k] = lines[k].dir;
    end
    for (int k = 0; k < 64; k++) look(k);
    // flip the direction bit of every live entry
    for (int k = 0; k < 64; k++) if (live[k]) begin
      @(negedge clk);
      upd_en = 1; upd_addr = addrs[k]; upd_dir = !pexp[k];
      @(posedge clk); #1; upd_en = 0;
      pexp[k] = !pexp[k];
    end
    for (int k = 0; k < 64; k++) look(k);
    @(negedge clk); invalidate = 1; @(posedge clk); #1; invalidate = 0;
    for (int k = 0; k < 64; k++) begin live[k] = 0; look(k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
