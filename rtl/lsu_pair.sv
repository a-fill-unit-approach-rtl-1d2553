// lsu_pair: the two load/store units ld/st_1 and ld/st_2.
//
// Each unit forms its word address from a base register value and a
// sign-extended offset and drives its own data-cache port (word accesses,
// LW and SW; the low two address bits are ignored). Because the fill unit
// assigns memory instructions to the units in program order, ld/st_1 is
// always the earlier of the two, and collisions between them resolve
// accordingly:
//   * RAW  - ld/st_1 stores and ld/st_2 loads the same word: the load
//            takes the store data directly (forwarding).
//   * WAW  - both store to the same word: only ld/st_2's write goes out
//            (priority to the later store).
//   * WAR  - ld/st_1 loads and ld/st_2 stores the same word: the load
//            reads the cache combinationally before the store is written
//            at the clock edge, so it sees the old value.
// The store value of ld/st_2 may be the load result of ld/st_1 in the
// same group (data_from_ls1); that selection is made here so that the
// path from the cache port back into the store data stays inside one
// module. Data-cache ports are combinational-read, write-on-clock-edge
// (a perfect cache).
module lsu_pair (
  input  logic        v1,
  input  logic        st1,
  input  logic [31:0] base1,
  input  logic [31:0] off1,
  input  logic [31:0] sd1,
  input  logic        v2,
  input  logic        st2,
  input  logic [31:0] base2,
  input  logic [31:0] off2,
  input  logic [31:0] sd2,
  input  logic        sd2_from_ls1,
  // data-cache ports
  output logic [29:0] d1_addr,
  output logic        d1_we,
  output logic [31:0] d1_wdata,
  input  logic [31:0] d1_rdata,
  output logic [29:0] d2_addr,
  output logic        d2_we,
  output logic [31:0] d2_wdata,
  input  logic [31:0] d2_rdata,
  // load results
  output logic [31:0] ld1,
  output logic [31:0] ld2,
  output logic        raw_fwd,
  output logic        waw_hit
);

  logic [31:0] ea1, ea2;

  assign ea1      = base1 + off1;
  assign ea2      = base2 + off2;
  assign d1_addr  = ea1[31:2];
  assign d2_addr  = ea2[31:2];
  assign ld1      = d1_rdata;
  assign d2_wdata = sd2_from_ls1 ? d1_rdata : sd2;
  assign d1_wdata = sd1;

  assign raw_fwd  = v1 && st1 && v2 && !st2 && d1_addr == d2_addr;
  assign waw_hit  = v1 && st1 && v2 && st2 && d1_addr == d2_addr;
  assign ld2      = raw_fwd ? sd1 : d2_rdata;
  assign d1_we    = v1 && st1 && !waw_hit;
  assign d2_we    = v2 && st2;

endmodule
