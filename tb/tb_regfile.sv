// tb_regfile: random writes through all five write ports and reads on
// all eight read ports, checked against a shadow copy; r0 stays zero.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  logic [7:0][4:0]  raddr;
  logic [7:0][31:0] rdata;
  logic [4:0]       we;
  logic [4:0][4:0]  waddr;
  logic [4:0][31:0] wdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  regfile dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int r = 0; r < 32; r++) model[r] = 0;
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // distinct write addresses in one cycle
      for (int w = 0; w < 5; w++) begin
        we[w] = 1'($urandom);
        waddr[w] = 5'((i * 5 + w * 7) % 32);
        wdata[w] = $urandom;
      end
      for (int p = 0; p < 8; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin failures++;
          $display("read r%0d got %h exp %h", raddr[p], rdata[p], model[raddr[p]]); end
      end
      @(posedge clk);
      for (int w = 0; w < 5; w++) if (we[w] && waddr[w] != 0) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
