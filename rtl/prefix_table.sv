// prefix_table: on-chip table of the unique prefixes of one header field.
//
// Rule Table entries point here instead of holding prefixes, because the
// number of distinct prefixes per field is small even for large rule sets.
// Each entry holds the prefix value (left-aligned, W bits) and its length.
// The classifier keeps one table per address and port field.
//
// Interface and timing: synchronous read, rd_len/rd_value valid the cycle
// after rd_en; one write port for the host. Contents are not reset: the host
// writes every index a valid rule can name.
module prefix_table
  import pc_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned IDX_W = pc_pkg::PFX_IDX_W
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_addr,
  output logic [LEN_W-1:0] rd_len,
  output logic [W-1:0]     rd_value,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  logic [LEN_W-1:0] wr_len,
  input  logic [W-1:0]     wr_value
);
  localparam int unsigned DEPTH = 2 ** IDX_W;

  logic [LEN_W+W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_len, wr_value};
    if (rd_en) {rd_len, rd_value} <= mem[rd_addr];
  end

endmodule
