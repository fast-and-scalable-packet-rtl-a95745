// pc_pkg: types and constants shared by the perfect-hash packet classifier.
//
// The classifier works on the five-field header (source/destination IPv4
// address, source/destination port, protocol). Every field except the protocol
// is reduced by a longest-prefix-match unit to a label, the index of the
// longest matching prefix in that field's prefix list. The labels, concatenated,
// form the key of the perfect hash function, which yields a rule number. The
// Rule Table entry for that number is then checked against the packet.
//
// Sizes: the 18-bit vertex word, the 16-entry spoiler TCAM and the ~1000-rule
// capacity follow the published design; label widths, the configuration bus
// and the encodings below are this design's own choices.
package pc_pkg;

  // ---- header fields ----
  localparam int unsigned IP_W    = 32;
  localparam int unsigned PORT_W  = 16;
  localparam int unsigned PROTO_W = 8;
  localparam int unsigned HDR_W   = 2 * IP_W + 2 * PORT_W + PROTO_W;  // 104

  typedef struct packed {
    logic [IP_W-1:0]    src_ip;
    logic [IP_W-1:0]    dst_ip;
    logic [PORT_W-1:0]  src_port;
    logic [PORT_W-1:0]  dst_port;
    logic [PROTO_W-1:0] proto;
  } header_t;

  // ---- labels (prefix indices) ----
  localparam int unsigned PFX_IDX_W   = 8;   // up to 256 unique prefixes per address/port field
  localparam int unsigned PROTO_IDX_W = 4;   // up to 16 unique protocol conditions
  localparam int unsigned KEY_W       = 4 * PFX_IDX_W + PROTO_IDX_W;  // 36

  typedef struct packed {
    logic [PFX_IDX_W-1:0]   src_ip;
    logic [PFX_IDX_W-1:0]   dst_ip;
    logic [PFX_IDX_W-1:0]   src_port;
    logic [PFX_IDX_W-1:0]   dst_port;
    logic [PROTO_IDX_W-1:0] proto;
  } key_t;

  // ---- rules ----
  localparam int unsigned RULE_W = 10;  // 1024 rule numbers
  localparam int unsigned VERT_W = 18;  // one signed vertex value per SRAM word

  // Compressed Rule Table entry: indices into the four Prefix Tables plus the
  // protocol stored directly (proto_any = wildcard).
  typedef struct packed {
    logic                 valid;
    logic [PFX_IDX_W-1:0] src_ip_idx;
    logic [PFX_IDX_W-1:0] dst_ip_idx;
    logic [PFX_IDX_W-1:0] src_port_idx;
    logic [PFX_IDX_W-1:0] dst_port_idx;
    logic                 proto_any;
    logic [PROTO_W-1:0]   proto;
  } rule_entry_t;

  localparam int unsigned RULE_ENTRY_W = $bits(rule_entry_t);

  // One ternary spoiler entry: bits of the header where mask is 1 must equal value.
  typedef struct packed {
    logic              valid;
    logic [RULE_W-1:0] rule;
    logic [HDR_W-1:0]  mask;
    logic [HDR_W-1:0]  value;
  } tcam_entry_t;

  // ---- configuration bus ----
  localparam int unsigned CFG_ADDR_W = 20;
  localparam int unsigned CFG_DATA_W = 256;

  // Data layouts (value fields are zero-extended to 32 bits):
  //   LPM entries      {valid[38], len[37:32], value[31:0]}
  //   Prefix entries   {len[37:32], value[31:0]}
  //   CFG_RULE         rule_entry_t in the low bits
  //   CFG_TCAM         tcam_entry_t in the low bits, cfg_addr = entry index
  //   CFG_VERTEX       vertex value [17:0], cfg_addr = vertex address
  //   CFG_SEEDS        {seed2[63:32], seed1[31:0]}
  //   CFG_DEFAULT      {enable[RULE_W], rule[RULE_W-1:0]}
  typedef enum logic [3:0] {
    CFG_LPM_SRC_IP   = 4'd0,
    CFG_LPM_DST_IP   = 4'd1,
    CFG_LPM_SRC_PORT = 4'd2,
    CFG_LPM_DST_PORT = 4'd3,
    CFG_LPM_PROTO    = 4'd4,
    CFG_PFX_SRC_IP   = 4'd5,
    CFG_PFX_DST_IP   = 4'd6,
    CFG_PFX_SRC_PORT = 4'd7,
    CFG_PFX_DST_PORT = 4'd8,
    CFG_RULE         = 4'd9,
    CFG_TCAM         = 4'd10,
    CFG_VERTEX       = 4'd11,
    CFG_SEEDS        = 4'd12,
    CFG_DEFAULT      = 4'd13
  } cfg_sel_e;

  localparam int unsigned LEN_W = 6;

  // Where a classification result came from.
  typedef enum logic [1:0] {
    SRC_NONE    = 2'd0,   // nothing matched and no universal rule is set
    SRC_HASH    = 2'd1,   // rule found by the perfect hash and confirmed by the check
    SRC_TCAM    = 2'd2,   // spoiler rule from the on-chip TCAM
    SRC_DEFAULT = 2'd3    // universal (match-all) rule
  } result_src_e;

endpackage
