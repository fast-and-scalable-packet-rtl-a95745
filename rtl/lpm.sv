// lpm: longest-prefix match of one header field, returning a label.
//
// The label is the index of the longest stored prefix that matches the field.
// The host stores each field's unique prefixes (port ranges already turned
// into prefixes) at the same indices it uses in the matching Prefix Table, so
// the label both forms part of the perfect-hash key and names the prefix.
//
// How it works: all ENTRIES prefixes are compared with the field in parallel;
// a priority scan keeps the matching entry with the largest length. The
// classifier only needs a unit with this function; this simple parallel search
// is this design's own choice and can be replaced by any faster LPM engine with
// the same in/out interface.
//
// Interface and timing: one lookup per cycle, result registered (latency 1).
// out_hit is 0 when no valid prefix matches (out_label is then 0). The table is
// written through wr_* one entry per cycle; reset clears all valid bits.
module lpm
  import pc_pkg::*;
#(
  parameter int unsigned W     = 32,  // field width
  parameter int unsigned IDX_W = 8    // label width; 2**IDX_W prefixes
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic             in_valid,
  input  logic [W-1:0]     in_field,
  output logic             out_valid,
  output logic             out_hit,
  output logic [IDX_W-1:0] out_label,
  // table write
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  logic             wr_valid,
  input  logic [LEN_W-1:0] wr_len,
  input  logic [W-1:0]     wr_value
);
  localparam int unsigned ENTRIES = 2 ** IDX_W;

  logic [ENTRIES-1:0] ent_valid;
  logic [LEN_W-1:0]   ent_len   [ENTRIES];
  logic [W-1:0]       ent_value [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ent_valid <= '0;
    else if (wr_en) ent_valid[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      ent_len[wr_addr]   <= wr_len;
      ent_value[wr_addr] <= wr_value;
    end
  end

  // Top-len-bits mask for a prefix of length len.
  function automatic logic [W-1:0] len_mask(input logic [LEN_W-1:0] len);
    return ~({W{1'b1}} >> len);
  endfunction

  logic             best_hit;
  logic [IDX_W-1:0] best_idx;
  logic [LEN_W-1:0] best_len;

  always_comb begin
    best_hit = 1'b0;
    best_idx = '0;
    best_len = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent_valid[i] && (((in_field ^ ent_value[i]) & len_mask(ent_len[i])) == '0)
          && (!best_hit || ent_len[i] > best_len)) begin
        best_hit = 1'b1;
        best_idx = IDX_W'(i);
        best_len = ent_len[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_label <= '0;
    end else begin
      out_valid <= in_valid;
      out_hit   <= best_hit;
      out_label <= best_idx;
    end
  end

endmodule
