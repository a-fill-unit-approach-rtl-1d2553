// shadow_cache: storage for filled lines, looked up by fetch address.
//
// A line is identified by the word address of the first instruction the
// fill unit placed into it. The cache is direct-mapped with ENTRIES
// entries (65536 by default, the largest size evaluated); the low
// log2(ENTRIES) address bits index an entry and the remaining bits form
// the tag. Every cycle the branch unit's next-instruction address is
// presented on rd_addr; hit rises combinationally when the indexed entry
// is valid and its tag matches, and rd_line then carries the stored line.
// A write (from the fill unit) stores a line at the rising clock edge,
// replacing whatever the entry held. invalidate clears every valid bit in
// one cycle; software raises it before running code it has modified,
// because one instruction word may be packed into several lines.
//
// Each entry also keeps a one-bit direction predictor for a tree-like
// line (rd_pred): it is set to the direction the line was filled along
// when the line is written, and to the branch's actual direction when
// the core reports one on upd_en/upd_addr/upd_dir. This design's choice;
// it stands in for a separate branch prediction cache.
module shadow_cache
  import fu_pkg::*;
#(
  parameter int ENTRIES = 65536
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rd_addr,
  output logic          hit,
  output sline_t        rd_line,
  output logic          rd_pred,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  sline_t        wr_line,
  input  logic          upd_en,
  input  logic [AW-1:0] upd_addr,
  input  logic          upd_dir,
  input  logic          invalidate
);

  localparam int IW = $clog2(ENTRIES);
  localparam int TW = AW - IW;

  typedef struct packed {
    logic [TW-1:0] tag;
    sline_t        line;
  } entry_t;

  entry_t               mem [ENTRIES];
  logic                 pred [ENTRIES];
  logic [ENTRIES-1:0]   valid;
  logic [IW-1:0]        ri, wi, ui;
  entry_t               re;

  assign ri      = rd_addr[IW-1:0];
  assign wi      = wr_addr[IW-1:0];
  assign ui      = upd_addr[IW-1:0];
  assign re      = mem[ri];
  assign hit     = valid[ri] && re.tag == rd_addr[AW-1:IW];
  assign rd_line = re.line;
  assign rd_pred = pred[ri];

  always_ff @(posedge clk)
    if (wr_en) mem[wi] <= '{tag: wr_addr[AW-1:IW], line: wr_line};

  always_ff @(posedge clk) begin
    if (upd_en)     pred[ui] <= upd_dir;
    if (wr_en)      pred[wi] <= wr_line.dir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          valid <= '0;
    else if (invalidate) valid <= '0;
    else if (wr_en)      valid[wi] <= 1'b1;
  end

endmodule
