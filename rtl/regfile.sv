// regfile: the 32 x 32-bit integer register file.
//
// NR read ports (eight by default, the number the shadow-cache line
// format assigns) read combinationally. NW write ports, one per unit
// that produces an integer result (int_1, int_2, ld/st_1, ld/st_2 and
// the branch unit's link), write on the rising clock edge. Because the
// fill unit never places two writers of one register in a group, the
// write ports never collide; if they do, the highest-numbered port wins.
// r0 reads as zero. Reset clears all registers.
module regfile #(
  parameter int NR = 8,
  parameter int NW = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][4:0]   raddr,
  output logic [NR-1:0][31:0]  rdata,
  input  logic [NW-1:0]        we,
  input  logic [NW-1:0][4:0]   waddr,
  input  logic [NW-1:0][31:0]  wdata
);

  logic [31:0][31:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else
      for (int w = 0; w < NW; w++)
        if (we[w] && waddr[w] != 5'd0) r[waddr[w]] <= wdata[w];
  end

  always_comb
    for (int p = 0; p < NR; p++) rdata[p] = raddr[p] == 5'd0 ? 32'h0 : r[raddr[p]];

endmodule
