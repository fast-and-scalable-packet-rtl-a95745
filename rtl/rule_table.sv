// rule_table: the on-chip, compressed Rule Table.
//
// One entry per rule number. An entry does not hold the rule's prefixes
// themselves, only their indices in the four Prefix Tables (source/destination
// address, source/destination port), plus the protocol value, which is small
// enough to keep in place (proto_any marks a wildcard protocol). This keeps the
// table small enough for block RAM. Unwritten rule numbers read as invalid, so
// a key that hashes to an unused number can never match.
//
// Interface and timing: synchronous read, rd_data valid the cycle after
// rd_en (the valid bit is taken from a flop vector that reset clears; the rest
// of the entry is a plain RAM). One write port for the host.
module rule_table
  import pc_pkg::*;
#(
  parameter int unsigned ADDR_W = pc_pkg::RULE_W   // 1024 rules
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output rule_entry_t       rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  rule_entry_t       wr_data
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  rule_entry_t       mem [DEPTH];
  logic [DEPTH-1:0]  vld;
  rule_entry_t       q;
  logic              q_vld;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      q_vld <= 1'b0;
    end else begin
      if (wr_en) vld[wr_addr] <= wr_data.valid;
      if (rd_en) q_vld <= vld[rd_addr];
    end
  end

  always_comb begin
    rd_data       = q;
    rd_data.valid = q_vld;
  end

endmodule
