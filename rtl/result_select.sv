// result_select: final decision of the classifier.
//
// Two sources can name a rule for a packet: the perfect-hash path (after its
// rule check confirmed the match) and the spoiler TCAM. Rules are numbered in
// priority order, so the smaller number wins when both hit. The universal
// match-all rule is kept out of the hashed rule set (it would force every
// combination of prefixes to become a pseudorule) and is returned here only
// when neither source matched, if the host has enabled it.
//
// Interface and timing: registered output, latency 1. out_src says which
// source gave out_rule (SRC_NONE: no rule matched, out_rule is 0).
module result_select
  import pc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              hash_match,
  input  logic [RULE_W-1:0] hash_rule,
  input  logic              tcam_hit,
  input  logic [RULE_W-1:0] tcam_rule,
  input  logic              default_valid,
  input  logic [RULE_W-1:0] default_rule,
  output logic              out_valid,
  output result_src_e       out_src,
  output logic [RULE_W-1:0] out_rule
);
  result_src_e       src;
  logic [RULE_W-1:0] rule;

  always_comb begin
    if (hash_match && (!tcam_hit || hash_rule < tcam_rule)) begin
      src  = SRC_HASH;
      rule = hash_rule;
    end else if (tcam_hit) begin
      src  = SRC_TCAM;
      rule = tcam_rule;
    end else if (default_valid) begin
      src  = SRC_DEFAULT;
      rule = default_rule;
    end else begin
      src  = SRC_NONE;
      rule = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_src   <= SRC_NONE;
      out_rule  <= '0;
    end else begin
      out_valid <= in_valid;
      out_src   <= src;
      out_rule  <= rule;
    end
  end

endmodule
