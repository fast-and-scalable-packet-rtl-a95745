// rule_check: verify the packet against the rule the perfect hash chose.
//
// The perfect hash maps every valid key to the right rule, but it maps keys of
// packets that match no rule to some arbitrary rule number too. This stage
// removes those false positives: it reads the rule's Rule Table entry, uses the
// entry's four indices to read the four Prefix Tables in parallel, and checks
// every header field against the stored prefix (and the protocol against the
// stored protocol or wildcard).
//
// Pipeline (latency 3, one packet per cycle):
//   stage 1  Rule Table read at in_rule
//   stage 2  four Prefix Table reads at the entry's indices
//   stage 3  prefix compare, registered into out_*
// out_match is 1 when the entry is valid and every field matches. out_hdr is
// the header delayed to line up with the result. The Rule Table / Prefix
// Table split follows the published prefix indexing scheme; the pipeline
// staging is this design's own.
module rule_check
  import pc_pkg::*;
#(
  parameter int unsigned RULE_AW = pc_pkg::RULE_W,
  parameter int unsigned IDX_W   = pc_pkg::PFX_IDX_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [RULE_AW-1:0] in_rule,
  input  header_t            in_hdr,
  output logic               out_valid,
  output logic               out_match,
  output logic [RULE_AW-1:0] out_rule,
  output header_t            out_hdr,
  // host writes
  input  logic               rt_wr_en,
  input  logic [RULE_AW-1:0] rt_wr_addr,
  input  rule_entry_t        rt_wr_data,
  input  logic [3:0]         pt_wr_en,     // 0 src ip, 1 dst ip, 2 src port, 3 dst port
  input  logic [IDX_W-1:0]   pt_wr_addr,
  input  logic [LEN_W-1:0]   pt_wr_len,
  input  logic [IP_W-1:0]    pt_wr_value   // ports use the low PORT_W bits
);
  // ---- stage 1: Rule Table ----
  logic               s1_valid;
  logic [RULE_AW-1:0] s1_rule;
  header_t            s1_hdr;
  rule_entry_t        s1_ent;

  rule_table #(.ADDR_W(RULE_AW)) u_rt (
    .clk, .rst_n,
    .rd_en(in_valid), .rd_addr(in_rule), .rd_data(s1_ent),
    .wr_en(rt_wr_en), .wr_addr(rt_wr_addr), .wr_data(rt_wr_data)
  );

  // ---- stage 2: Prefix Tables ----
  logic               s2_valid;
  logic [RULE_AW-1:0] s2_rule;
  header_t            s2_hdr;
  logic               s2_ent_valid, s2_proto_any;
  logic [PROTO_W-1:0] s2_proto;
  logic [LEN_W-1:0]   sip_len, dip_len, spt_len, dpt_len;
  logic [IP_W-1:0]    sip_val, dip_val;
  logic [PORT_W-1:0]  spt_val, dpt_val;

  prefix_table #(.W(IP_W), .IDX_W(IDX_W)) u_pt_sip (
    .clk, .rd_en(s1_valid), .rd_addr(s1_ent.src_ip_idx), .rd_len(sip_len), .rd_value(sip_val),
    .wr_en(pt_wr_en[0]), .wr_addr(pt_wr_addr), .wr_len(pt_wr_len), .wr_value(pt_wr_value));
  prefix_table #(.W(IP_W), .IDX_W(IDX_W)) u_pt_dip (
    .clk, .rd_en(s1_valid), .rd_addr(s1_ent.dst_ip_idx), .rd_len(dip_len), .rd_value(dip_val),
    .wr_en(pt_wr_en[1]), .wr_addr(pt_wr_addr), .wr_len(pt_wr_len), .wr_value(pt_wr_value));
  prefix_table #(.W(PORT_W), .IDX_W(IDX_W)) u_pt_spt (
    .clk, .rd_en(s1_valid), .rd_addr(s1_ent.src_port_idx), .rd_len(spt_len), .rd_value(spt_val),
    .wr_en(pt_wr_en[2]), .wr_addr(pt_wr_addr), .wr_len(pt_wr_len),
    .wr_value(pt_wr_value[PORT_W-1:0]));
  prefix_table #(.W(PORT_W), .IDX_W(IDX_W)) u_pt_dpt (
    .clk, .rd_en(s1_valid), .rd_addr(s1_ent.dst_port_idx), .rd_len(dpt_len), .rd_value(dpt_val),
    .wr_en(pt_wr_en[3]), .wr_addr(pt_wr_addr), .wr_len(pt_wr_len),
    .wr_value(pt_wr_value[PORT_W-1:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid     <= 1'b0;
      s1_rule      <= '0;
      s1_hdr       <= '0;
      s2_valid     <= 1'b0;
      s2_rule      <= '0;
      s2_hdr       <= '0;
      s2_ent_valid <= 1'b0;
      s2_proto_any <= 1'b0;
      s2_proto     <= '0;
    end else begin
      s1_valid     <= in_valid;
      s1_rule      <= in_rule;
      s1_hdr       <= in_hdr;
      s2_valid     <= s1_valid;
      s2_rule      <= s1_rule;
      s2_hdr       <= s1_hdr;
      s2_ent_valid <= s1_ent.valid;
      s2_proto_any <= s1_ent.proto_any;
      s2_proto     <= s1_ent.proto;
    end
  end

  // ---- stage 3: compare ----
  function automatic logic match32(input logic [IP_W-1:0] a, input logic [IP_W-1:0] p,
                                   input logic [LEN_W-1:0] len);
    return ((a ^ p) & ~({IP_W{1'b1}} >> len)) == '0;
  endfunction

  function automatic logic match16(input logic [PORT_W-1:0] a, input logic [PORT_W-1:0] p,
                                   input logic [LEN_W-1:0] len);
    return ((a ^ p) & ~({PORT_W{1'b1}} >> len)) == '0;
  endfunction

  logic s3_match;
  assign s3_match = s2_ent_valid
                 && match32(s2_hdr.src_ip, sip_val, sip_len)
                 && match32(s2_hdr.dst_ip, dip_val, dip_len)
                 && match16(s2_hdr.src_port, spt_val, spt_len)
                 && match16(s2_hdr.dst_port, dpt_val, dpt_len)
                 && (s2_proto_any || s2_hdr.proto == s2_proto);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_match <= 1'b0;
      out_rule  <= '0;
      out_hdr   <= '0;
    end else begin
      out_valid <= s2_valid;
      out_match <= s2_valid && s3_match;
      out_rule  <= s2_rule;
      out_hdr   <= s2_hdr;
    end
  end

endmodule
