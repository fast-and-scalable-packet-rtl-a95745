// spoiler_tcam: small on-chip ternary match for "spoiler" rules.
//
// Some rules, when crossed with the others, would create a great many
// pseudorules (and so a large perfect-hash graph). They are taken out of the
// hashed rule set and kept here instead. Each entry holds a value/mask pair
// over the whole 104-bit header (a port range that is not one prefix takes
// several entries) and the rule number it stands for.
//
// How it works: every valid entry compares (hdr ^ value) & mask with zero in
// parallel; among the hits the smallest rule number (highest priority) wins.
// Priority by rule number is this design's choice; the entry count of 16
// follows the published evaluation.
//
// Interface and timing: one lookup per cycle, registered result (latency 1).
// Reset clears all entries; the host writes one entry per cycle.
module spoiler_tcam
  import pc_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  header_t           in_hdr,
  output logic              out_valid,
  output logic              out_hit,
  output logic [RULE_W-1:0] out_rule,
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_addr,
  input  tcam_entry_t       wr_data
);
  tcam_entry_t ent [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else if (wr_en) begin
      ent[wr_addr] <= wr_data;
    end
  end

  logic              hit;
  logic [RULE_W-1:0] best;

  always_comb begin
    hit  = 1'b0;
    best = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && (((in_hdr ^ ent[i].value) & ent[i].mask) == '0)
          && (!hit || ent[i].rule < best)) begin
        hit  = 1'b1;
        best = ent[i].rule;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_rule  <= '0;
    end else begin
      out_valid <= in_valid;
      out_hit   <= in_valid && hit;
      out_rule  <= best;
    end
  end

endmodule
