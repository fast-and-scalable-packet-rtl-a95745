// phf: perfect hash function mapping an LPM key to a rule number.
//
// The host builds, offline, an acyclic graph whose edges are the keys (rules
// and pseudorules as concatenated LPM labels) and whose two endpoints are
// f1(key) and f2(key); it then assigns every vertex an integer so that, for
// each edge, the two vertex values add up to the rule number the key must map
// to. In hardware the function is therefore: hash the key twice, read the two
// vertex values from the Vertex Table, add them. Many keys deliberately land on
// the same rule number, so pseudorules are never stored.
//
// How it works: f1 and f2 are jenkins_hash instances with runtime seeds (the
// host may re-seed when a graph turns out cyclic); each 32-bit hash is reduced
// to a vertex index by keeping its low VIDX_W bits. The Vertex Table lives in
// external SRAM with one read command per cycle per chip. An SRAM word holds
// VPW vertices side by side (VPW = 1 by default): the vertex index is the word
// address followed by the part number, so a wider SRAM holds VPW times more
// vertices at the same number of addresses. The part number of every read is
// carried along for SRAM_LAT cycles to pick the vertex out of the returned word.
//  - NSRAM = 1 (default): a key needs two cycles, the f1 read in the first and
//    the f2 read in the second; returning words are paired in order.
//  - NSRAM = 2: each chip holds a full copy of the Vertex Table; the f1 read
//    goes to chip 0 and the f2 read to chip 1 in the same cycle, so a key can
//    be taken every cycle. Vertex writes go to both chips.
// The rule number is the low RULE_W bits of the sum (vertex values are signed
// VERT_W-bit integers, and the sum is taken modulo 2**RULE_W, so any signed
// assignment of values works).
//
// Interface and timing:
//  - in_valid/in_key: at most one key every 3 - NSRAM cycles (in_ready says
//    when a key may be given; an assertion checks it is respected).
//  - SRAM ports (one per chip): sram_rd/sram_addr issue a read; the SRAM
//    answers with sram_rvalid/sram_rdata a fixed number of cycles later, in
//    order. sram_wr/sram_wdata/sram_wpart write a vertex (sram_wpart enables
//    the word parts to write, so it is always 1 when VPW = 1); writes are
//    granted (wr_ack) only in cycles with no read.
//  - out_valid/out_rule: SRAM read latency + 4 - NSRAM cycles after in_valid.
// The two-read structure, 18-bit vertex words, Jenkins hashes and scaling by
// adding SRAM chips, and several vertices per wider SRAM word, follow the
// published design; the address reduction, seed register, copy-per-chip layout,
// part order within a word and write arbitration are this design's own choices.
module phf
#(
  parameter int unsigned KEY_W   = pc_pkg::KEY_W,
  parameter int unsigned VADDR_W = 18,              // 262144 vertices
  parameter int unsigned VERT_W  = pc_pkg::VERT_W,
  parameter int unsigned RULE_W  = pc_pkg::RULE_W,
  parameter int unsigned NSRAM   = 1,               // 1 or 2 external SRAM chips
  parameter int unsigned VPW     = 1,               // vertices per SRAM word: 1, 2 or 4
  parameter int unsigned SRAM_LAT = 2,              // SRAM read latency in cycles
  localparam int unsigned PART_W = VPW > 1 ? $clog2(VPW) : 1,
  localparam int unsigned VIDX_W = VADDR_W + $clog2(VPW),  // vertex index width
  localparam int unsigned WORD_W = VPW * VERT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // seeds of f1 and f2
  input  logic               seed_we,
  input  logic [31:0]        seed1_in,
  input  logic [31:0]        seed2_in,
  // key in
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [KEY_W-1:0]   in_key,
  // rule number out
  output logic               out_valid,
  output logic [RULE_W-1:0]  out_rule,
  // Vertex Table write request from the configuration path
  input  logic               wr_req,
  input  logic [VIDX_W-1:0]  wr_addr,
  input  logic [VERT_W-1:0]  wr_data,
  output logic               wr_ack,
  // external SRAM holding the Vertex Table
  output logic [NSRAM-1:0]              sram_rd,
  output logic [NSRAM-1:0]              sram_wr,
  output logic [NSRAM-1:0][VADDR_W-1:0] sram_addr,
  output logic [NSRAM-1:0][WORD_W-1:0]  sram_wdata,
  output logic [NSRAM-1:0][VPW-1:0]     sram_wpart,
  input  logic [NSRAM-1:0]              sram_rvalid,
  input  logic [NSRAM-1:0][WORD_W-1:0]  sram_rdata
);
  // word address and part number of a vertex index
  function automatic logic [VADDR_W-1:0] word_of(input logic [VIDX_W-1:0] v);
    return VADDR_W'(v >> $clog2(VPW));
  endfunction

  function automatic logic [PART_W-1:0] part_of(input logic [VIDX_W-1:0] v);
    return PART_W'(v & VIDX_W'(VPW - 1));
  endfunction

  function automatic logic [VERT_W-1:0] pick(input logic [WORD_W-1:0] w,
                                            input logic [PART_W-1:0] p);
    return w[p * VERT_W +: VERT_W];
  endfunction

  logic [31:0] seed1, seed2;
  logic [31:0] h1_full, h2_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed1 <= 32'h0000_0001;
      seed2 <= 32'h0000_0002;
    end else if (seed_we) begin
      seed1 <= seed1_in;
      seed2 <= seed2_in;
    end
  end

  jenkins_hash #(.KEY_W(KEY_W)) u_f1 (.key(in_key), .seed(seed1), .hash(h1_full));
  jenkins_hash #(.KEY_W(KEY_W)) u_f2 (.key(in_key), .seed(seed2), .hash(h2_full));

  // ---- hash stage: holds both vertex addresses while the reads go out ----
  logic               hs_valid;
  logic               hs_second;   // one chip: the f1 read went out, f2 read is next
  logic [VIDX_W-1:0]  hs_a1, hs_a2;
  logic               hs_done;     // last read of this key goes out this cycle

  assign hs_done  = (NSRAM > 1) || hs_second;
  assign in_ready = !hs_valid || hs_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_valid  <= 1'b0;
      hs_second <= 1'b0;
      hs_a1     <= '0;
      hs_a2     <= '0;
    end else begin
      if (hs_valid && NSRAM == 1) hs_second <= !hs_second;
      if (in_valid && in_ready) begin
        hs_valid <= 1'b1;
        hs_a1    <= h1_full[VIDX_W-1:0];
        hs_a2    <= h2_full[VIDX_W-1:0];
      end else if (hs_valid && hs_done) begin
        hs_valid <= 1'b0;
      end
    end
  end

  // ---- SRAM commands ----
  assign wr_ack = wr_req && !hs_valid;

  logic [NSRAM-1:0][PART_W-1:0] rd_part;   // part of the word each chip reads now

  always_comb begin
    for (int i = 0; i < NSRAM; i++) begin
      sram_rd[i]    = hs_valid;
      sram_wr[i]    = wr_ack;
      sram_wdata[i] = {VPW{wr_data}};
      sram_wpart[i] = VPW'(1) << part_of(wr_addr);
    end
    if (NSRAM == 1) begin
      sram_addr[0] = word_of(hs_valid ? (hs_second ? hs_a2 : hs_a1) : wr_addr);
      rd_part[0]   = part_of(hs_second ? hs_a2 : hs_a1);
    end else begin
      sram_addr[0]       = word_of(hs_valid ? hs_a1 : wr_addr);
      sram_addr[NSRAM-1] = word_of(hs_valid ? hs_a2 : wr_addr);
      rd_part[0]         = part_of(hs_a1);
      rd_part[NSRAM-1]   = part_of(hs_a2);
    end
  end

  // part numbers travel alongside the reads (SRAM_LAT cycles)
  logic [NSRAM-1:0][PART_W-1:0] part_pipe [SRAM_LAT];
  logic [NSRAM-1:0][PART_W-1:0] ret_part;   // part of the word returning now

  always_ff @(posedge clk) begin
    part_pipe[0] <= rd_part;
    for (int i = 1; i < SRAM_LAT; i++) part_pipe[i] <= part_pipe[i-1];
  end
  assign ret_part = part_pipe[SRAM_LAT-1];

  logic [NSRAM-1:0][VERT_W-1:0] rvert;      // returned vertex value per chip
  always_comb
    for (int i = 0; i < NSRAM; i++) rvert[i] = pick(sram_rdata[i], ret_part[i]);

  // ---- pair the returning vertex values and add them ----
  logic              rd_second;
  logic [VERT_W-1:0] v1;
  logic [VERT_W-1:0] vsum;
  logic              pair_done;

  always_comb begin
    if (NSRAM == 1) begin
      vsum      = v1 + rvert[0];
      pair_done = sram_rvalid[0] && rd_second;
    end else begin
      vsum      = rvert[0] + rvert[NSRAM-1];
      pair_done = sram_rvalid[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_second <= 1'b0;
      v1        <= '0;
      out_valid <= 1'b0;
      out_rule  <= '0;
    end else begin
      out_valid <= pair_done;
      if (pair_done) out_rule <= vsum[RULE_W-1:0];
      if (NSRAM == 1 && sram_rvalid[0]) begin
        rd_second <= !rd_second;
        if (!rd_second) v1 <= rvert[0];
      end
    end
  end

  // A new key may only arrive when the unit can take it.
  a_key_spacing: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("phf: key given while the previous key's reads are still going out");

  if (NSRAM > 1) begin : g_pair
    a_chips_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                      sram_rvalid[0] == sram_rvalid[NSRAM-1])
      else $error("phf: the two SRAM chips returned data in different cycles");
  end

  initial assert (NSRAM == 1 || NSRAM == 2) else $error("phf: NSRAM must be 1 or 2");
  initial assert (VPW == 1 || VPW == 2 || VPW == 4) else $error("phf: VPW must be 1, 2 or 4");
  initial assert (SRAM_LAT >= 1) else $error("phf: SRAM_LAT must be at least 1");

endmodule
