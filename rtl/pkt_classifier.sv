// pkt_classifier: five-field packet classifier with a constant two external
// memory reads per packet.
//
// Datapath, in order:
//   1. lpm x5      each header field -> label of its longest matching prefix
//                  (the spoiler TCAM is searched at the same time)
//   2. phf         concatenated labels -> f1, f2 -> two Vertex Table reads in
//                  the external SRAM -> sum = rule number. Keys of rules and of
//                  their pseudorules all sum to the right rule by construction.
//   3. rule_check  Rule Table + Prefix Tables: confirm the packet really
//                  matches that rule (keys of non-matching packets hash to
//                  arbitrary numbers)
//   4. result_select  smaller rule number of hash path and TCAM, else the
//                  universal rule, else no match.
// Every packet takes the same path, so throughput and latency do not depend on
// the rule set. With one SRAM chip (NSRAM = 1, default) the two reads share it:
// one packet every two cycles, latency SRAM_LAT + 8 cycles from acceptance to
// out_valid. With NSRAM = 2 each chip holds a copy of the Vertex Table and
// serves one of the two reads: one packet per cycle, latency SRAM_LAT + 7.
// The three-step structure, the two SRAM reads, the on-chip compressed rule
// storage and the spoiler TCAM follow the published design; the configuration
// bus, the pipeline staging and the SRAM port protocol are this design's own.
//
// Interfaces:
//  - in_valid/in_ready/in_hdr: packet headers; with one SRAM chip in_ready is
//    low in the cycle after an accept; it is also low while a Vertex Table
//    write waits.
//  - out_valid/out_src/out_rule/out_hdr: one result per accepted header, in
//    order, no back-pressure.
//  - cfg_*: host writes to all tables (layouts in pc_pkg). cfg_ready is 1
//    except for CFG_VERTEX writes, which wait for a cycle with no SRAM read.
//  - sram_*: external SRAM chips holding the Vertex Table, index = chip; a
//    read issued in cycle t must return with sram_rvalid in cycle t + SRAM_LAT.
//    A word holds VPW vertices (VPW = 1 by default); sram_wpart selects the
//    parts a write changes. cfg_addr of a CFG_VERTEX write is the vertex index
//    (word address * VPW + part).
module pkt_classifier
  import pc_pkg::*;
#(
  parameter int unsigned VADDR_W  = 18,  // Vertex Table: 2**18 words of 18 bits
  parameter int unsigned SRAM_LAT = 2,   // SRAM read latency in cycles
  parameter int unsigned TCAM_N   = 16,  // spoiler TCAM entries
  parameter int unsigned NSRAM    = 1,   // external SRAM chips, 1 or 2
  parameter int unsigned VPW      = 1,   // vertices per SRAM word: 1, 2 or 4
  localparam int unsigned VIDX_W  = VADDR_W + $clog2(VPW)  // vertex index width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // packet headers in
  input  logic                  in_valid,
  output logic                  in_ready,
  input  header_t               in_hdr,
  // classification results out
  output logic                  out_valid,
  output logic [1:0]            out_src,    // result_src_e
  output logic [RULE_W-1:0]     out_rule,
  output header_t               out_hdr,
  // host configuration
  input  logic                  cfg_valid,
  output logic                  cfg_ready,
  input  logic [3:0]            cfg_sel,    // cfg_sel_e
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  logic [CFG_DATA_W-1:0] cfg_data,
  // external SRAM (Vertex Table)
  output logic [NSRAM-1:0]              sram_rd,
  output logic [NSRAM-1:0]              sram_wr,
  output logic [NSRAM-1:0][VADDR_W-1:0] sram_addr,
  output logic [NSRAM-1:0][VPW*VERT_W-1:0] sram_wdata,
  output logic [NSRAM-1:0][VPW-1:0]        sram_wpart,
  input  logic [NSRAM-1:0]                 sram_rvalid,
  input  logic [NSRAM-1:0][VPW*VERT_W-1:0] sram_rdata
);
  localparam int unsigned TCAM_IW = $clog2(TCAM_N);
  localparam int unsigned HDLY    = SRAM_LAT + 4 - NSRAM;  // phf latency (its input is one LPM stage later)
  localparam int unsigned RCLAT   = 3;             // rule_check latency

  // ---------------- configuration decode ----------------
  cfg_sel_e sel;
  logic     cfg_go;
  logic     vt_wr_ack;
  logic     default_valid;
  logic [RULE_W-1:0] default_rule;

  assign sel       = cfg_sel_e'(cfg_sel);
  assign cfg_ready = (sel == CFG_VERTEX) ? vt_wr_ack : 1'b1;
  assign cfg_go    = cfg_valid && cfg_ready;

  logic [4:0] lpm_we;
  logic [3:0] pt_we;
  always_comb begin
    for (int i = 0; i < 5; i++) lpm_we[i] = cfg_go && (sel == cfg_sel_e'(i));
    for (int i = 0; i < 4; i++) pt_we[i]  = cfg_go && (sel == cfg_sel_e'(i + 5));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      default_valid <= 1'b0;
      default_rule  <= '0;
    end else if (cfg_go && sel == CFG_DEFAULT) begin
      default_valid <= cfg_data[RULE_W];
      default_rule  <= cfg_data[RULE_W-1:0];
    end
  end

  // ---------------- input: one header every 3 - NSRAM cycles ----------------
  logic accept, gap;
  assign in_ready = (NSRAM > 1 || !gap) && !(cfg_valid && sel == CFG_VERTEX);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gap <= 1'b0;
    else        gap <= accept;
  end

  // ---------------- step 1: LPM per field, spoiler TCAM ----------------
  logic [4:0] l_valid;
  key_t       key;

  lpm #(.W(IP_W), .IDX_W(PFX_IDX_W)) u_lpm_sip (
    .clk, .rst_n, .in_valid(accept), .in_field(in_hdr.src_ip),
    .out_valid(l_valid[0]), .out_hit(), .out_label(key.src_ip),
    .wr_en(lpm_we[0]), .wr_addr(cfg_addr[PFX_IDX_W-1:0]), .wr_valid(cfg_data[38]),
    .wr_len(cfg_data[37:32]), .wr_value(cfg_data[IP_W-1:0]));
  lpm #(.W(IP_W), .IDX_W(PFX_IDX_W)) u_lpm_dip (
    .clk, .rst_n, .in_valid(accept), .in_field(in_hdr.dst_ip),
    .out_valid(l_valid[1]), .out_hit(), .out_label(key.dst_ip),
    .wr_en(lpm_we[1]), .wr_addr(cfg_addr[PFX_IDX_W-1:0]), .wr_valid(cfg_data[38]),
    .wr_len(cfg_data[37:32]), .wr_value(cfg_data[IP_W-1:0]));
  lpm #(.W(PORT_W), .IDX_W(PFX_IDX_W)) u_lpm_spt (
    .clk, .rst_n, .in_valid(accept), .in_field(in_hdr.src_port),
    .out_valid(l_valid[2]), .out_hit(), .out_label(key.src_port),
    .wr_en(lpm_we[2]), .wr_addr(cfg_addr[PFX_IDX_W-1:0]), .wr_valid(cfg_data[38]),
    .wr_len(cfg_data[37:32]), .wr_value(cfg_data[PORT_W-1:0]));
  lpm #(.W(PORT_W), .IDX_W(PFX_IDX_W)) u_lpm_dpt (
    .clk, .rst_n, .in_valid(accept), .in_field(in_hdr.dst_port),
    .out_valid(l_valid[3]), .out_hit(), .out_label(key.dst_port),
    .wr_en(lpm_we[3]), .wr_addr(cfg_addr[PFX_IDX_W-1:0]), .wr_valid(cfg_data[38]),
    .wr_len(cfg_data[37:32]), .wr_value(cfg_data[PORT_W-1:0]));
  lpm #(.W(PROTO_W), .IDX_W(PROTO_IDX_W)) u_lpm_proto (
    .clk, .rst_n, .in_valid(accept), .in_field(in_hdr.proto),
    .out_valid(l_valid[4]), .out_hit(), .out_label(key.proto),
    .wr_en(lpm_we[4]), .wr_addr(cfg_addr[PROTO_IDX_W-1:0]), .wr_valid(cfg_data[38]),
    .wr_len(cfg_data[37:32]), .wr_value(cfg_data[PROTO_W-1:0]));

  logic              t_valid, t_hit;
  logic [RULE_W-1:0] t_rule;

  spoiler_tcam #(.ENTRIES(TCAM_N)) u_tcam (
    .clk, .rst_n, .in_valid(accept), .in_hdr,
    .out_valid(t_valid), .out_hit(t_hit), .out_rule(t_rule),
    .wr_en(cfg_go && sel == CFG_TCAM), .wr_addr(cfg_addr[TCAM_IW-1:0]),
    .wr_data(tcam_entry_t'(cfg_data[$bits(tcam_entry_t)-1:0])));

  header_t h1;  // header lined up with the LPM labels
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h1 <= '0;
    else        h1 <= in_hdr;
  end

  // ---------------- step 2: perfect hash function ----------------
  logic              p_valid, p_in_ready;
  logic [RULE_W-1:0] p_rule;

  phf #(.KEY_W(KEY_W), .VADDR_W(VADDR_W), .VERT_W(VERT_W), .RULE_W(RULE_W), .NSRAM(NSRAM),
        .VPW(VPW), .SRAM_LAT(SRAM_LAT)) u_phf (
    .clk, .rst_n,
    .seed_we(cfg_go && sel == CFG_SEEDS), .seed1_in(cfg_data[31:0]), .seed2_in(cfg_data[63:32]),
    .in_valid(l_valid[0]), .in_ready(p_in_ready), .in_key(key),
    .out_valid(p_valid), .out_rule(p_rule),
    .wr_req(cfg_valid && sel == CFG_VERTEX), .wr_addr(cfg_addr[VIDX_W-1:0]),
    .wr_data(cfg_data[VERT_W-1:0]), .wr_ack(vt_wr_ack),
    .sram_rd, .sram_wr, .sram_addr, .sram_wdata, .sram_wpart, .sram_rvalid, .sram_rdata);

  // header and TCAM result wait for the hash (HDLY cycles)
  typedef struct packed {
    logic              valid;
    header_t           hdr;
    logic              t_hit;
    logic [RULE_W-1:0] t_rule;
  } side_t;

  side_t dly [HDLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HDLY; i++) dly[i] <= '0;
    end else begin
      dly[0] <= '{valid: t_valid, hdr: h1, t_hit: t_hit, t_rule: t_rule};
      for (int i = 1; i < HDLY; i++) dly[i] <= dly[i-1];
    end
  end

  // ---------------- step 3: rule check ----------------
  logic              c_valid, c_match;
  logic [RULE_W-1:0] c_rule;
  header_t           c_hdr;

  rule_check #(.RULE_AW(RULE_W), .IDX_W(PFX_IDX_W)) u_check (
    .clk, .rst_n,
    .in_valid(p_valid), .in_rule(p_rule), .in_hdr(dly[HDLY-1].hdr),
    .out_valid(c_valid), .out_match(c_match), .out_rule(c_rule), .out_hdr(c_hdr),
    .rt_wr_en(cfg_go && sel == CFG_RULE), .rt_wr_addr(cfg_addr[RULE_W-1:0]),
    .rt_wr_data(rule_entry_t'(cfg_data[RULE_ENTRY_W-1:0])),
    .pt_wr_en(pt_we), .pt_wr_addr(cfg_addr[PFX_IDX_W-1:0]),
    .pt_wr_len(cfg_data[37:32]), .pt_wr_value(cfg_data[IP_W-1:0]));

  logic              tq_hit  [RCLAT];
  logic [RULE_W-1:0] tq_rule [RCLAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RCLAT; i++) begin
        tq_hit[i]  <= 1'b0;
        tq_rule[i] <= '0;
      end
    end else begin
      tq_hit[0]  <= dly[HDLY-1].t_hit;
      tq_rule[0] <= dly[HDLY-1].t_rule;
      for (int i = 1; i < RCLAT; i++) begin
        tq_hit[i]  <= tq_hit[i-1];
        tq_rule[i] <= tq_rule[i-1];
      end
    end
  end

  // ---------------- step 4: result ----------------
  result_src_e rs_src;

  result_select u_sel (
    .clk, .rst_n,
    .in_valid(c_valid), .hash_match(c_match), .hash_rule(c_rule),
    .tcam_hit(tq_hit[RCLAT-1]), .tcam_rule(tq_rule[RCLAT-1]),
    .default_valid, .default_rule,
    .out_valid, .out_src(rs_src), .out_rule);

  assign out_src = rs_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_hdr <= '0;
    else        out_hdr <= c_hdr;
  end

  // The SRAM must honour its fixed latency: the hash result must meet its header.
  a_sram_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                   p_valid == dly[HDLY-1].valid)
    else $error("pkt_classifier: Vertex Table data did not return after SRAM_LAT cycles");

  a_phf_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                  l_valid[0] |-> p_in_ready);

endmodule
