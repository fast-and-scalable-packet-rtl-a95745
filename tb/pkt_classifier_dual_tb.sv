// pkt_classifier_dual_tb: end-to-end test of the classifier with two SRAM
// chips (NSRAM = 2) of 36-bit words holding two vertices each (VPW = 2), every
// other parameter at its default. Each chip holds a copy of the Vertex Table
// and serves one of the two reads, so the classifier must take one header
// every cycle with a latency of SRAM_LAT + 7. Vertex indices are 19 bits
// (word address and part), so the table has 2**19 vertices.
//
// The testbench plays the host. For each of two rule sets it
//   1. draws random rules over fixed per-field prefix lists (rule number =
//      priority, 1 is highest), sends two of them to the spoiler TCAM,
//   2. expands pseudorules: every combination of per-field prefixes is a key
//      whose target is the highest-priority hashed rule covering it,
//   3. builds the perfect hash: edges f1(key)-f2(key) with its own lookup3
//      model, re-seeding until the graph is acyclic, then walks each tree to
//      give every vertex a value so that the two ends of an edge sum to the
//      key's target (mod 2**18),
//   4. loads LPMs, Prefix Tables, Rule Table, TCAM, seeds, universal rule and
//      the Vertex Table (through the classifier into the SRAM model),
//   5. streams packets with in_valid held high and compares every result with
//      a linear-search reference classifier, its latency (SRAM_LAT + 7), the
//      accept rate (one header every cycle) and the SRAM reads (one per chip
//      per packet).
// It counts each mechanism: hash hit, pseudorule hit, TCAM hit, TCAM beating
// the hash path and the reverse, false positives rejected by the rule check,
// no-match with the universal rule disabled, Vertex Table writes held off by
// traffic, graphs that needed re-seeding, and a full reload with a new rule set.
module pkt_classifier_dual_tb;
  import pc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SRAM_LAT = 2;        // the top's default
  localparam int VA_W     = 18;       // the top's default (SRAM word address)
  localparam int VPW      = 2;        // vertices per SRAM word
  localparam int VI_W     = VA_W + 1; // vertex index width
  localparam int LATENCY  = SRAM_LAT + 7;  // cycles from the input cycle to the output cycle
  localparam int ND       = 5;
  localparam int NR       = 24;       // rules per rule set (1..NR)
  localparam int UNIV     = NR + 1;   // number of the universal rule
  localparam int NPKT     = 1500;     // packets per phase

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT and SRAM ----------------
  logic                  in_valid = 0, in_ready;
  header_t               in_hdr = '0;
  logic                  out_valid;
  logic [1:0]            out_src;
  logic [RULE_W-1:0]     out_rule;
  header_t               out_hdr;
  logic                  cfg_valid = 0, cfg_ready;
  logic [3:0]            cfg_sel = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = 0;
  logic [CFG_DATA_W-1:0] cfg_data = 0;
  logic [1:0]            sram_rd, sram_wr, sram_rvalid;   // two SRAM chips
  logic [1:0][VA_W-1:0]   sram_addr;
  logic [1:0][VPW*VERT_W-1:0] sram_wdata, sram_rdata;
  logic [1:0][VPW-1:0]        sram_wpart;

  pkt_classifier #(.NSRAM(2), .VPW(VPW)) dut (.*);

  sram_model #(.AW(VA_W), .DW(VPW*VERT_W), .LAT(SRAM_LAT), .PARTS(VPW)) u_sram0 (
    .clk, .rd(sram_rd[0]), .wr(sram_wr[0]), .addr(sram_addr[0]), .wdata(sram_wdata[0]),
    .wpart(sram_wpart[0]),
    .rvalid(sram_rvalid[0]), .rdata(sram_rdata[0]));
  sram_model #(.AW(VA_W), .DW(VPW*VERT_W), .LAT(SRAM_LAT), .PARTS(VPW)) u_sram1 (
    .clk, .rd(sram_rd[1]), .wr(sram_wr[1]), .addr(sram_addr[1]), .wdata(sram_wdata[1]),
    .wpart(sram_wpart[1]),
    .rvalid(sram_rvalid[1]), .rdata(sram_rdata[1]));

  // both chips together
  function automatic int unsigned sram_reads();
    return u_sram0.reads + u_sram1.reads;
  endfunction

  // ---------------- rule set ----------------
  int               dw [ND] = '{32, 32, 16, 16, 8};
  longint unsigned  pv [ND][$];
  int               pl [ND][$];
  int               rix [NR+1][ND];   // rule r, field d -> prefix index
  bit               spoiler [NR+1];

  task automatic add_pfx(int d, longint unsigned v, int l);
    pv[d].push_back(v);
    pl[d].push_back(l);
  endtask

  initial begin
    add_pfx(0, 0, 0); add_pfx(0, 32'h0A00_0000, 8); add_pfx(0, 32'h0A01_0000, 16);
    add_pfx(0, 32'h0A01_0200, 24); add_pfx(0, 32'hC0A8_0000, 16); add_pfx(0, 32'hC0A8_0105, 32);
    add_pfx(1, 0, 0); add_pfx(1, 32'hAC10_0000, 12); add_pfx(1, 32'hAC10_0100, 24);
    add_pfx(1, 32'h0808_0808, 32); add_pfx(1, 32'h0A00_0000, 8);
    add_pfx(2, 0, 0); add_pfx(2, 16'h0000, 6); add_pfx(2, 16'h0400, 6);
    add_pfx(2, 16'h1F90, 16); add_pfx(2, 16'h0400, 8);
    add_pfx(3, 0, 0); add_pfx(3, 16'd80, 16); add_pfx(3, 16'd443, 16);
    add_pfx(3, 16'h0000, 6); add_pfx(3, 16'h0000, 10);
    add_pfx(4, 0, 0); add_pfx(4, 8'd6, 8); add_pfx(4, 8'd17, 8);
  end

  function automatic bit rule_hits(int r, header_t h);
    longint unsigned f [ND];
    f = '{h.src_ip, h.dst_ip, h.src_port, h.dst_port, h.proto};
    for (int d = 0; d < ND; d++)
      if (!pfx_has(pv[d][rix[r][d]], pl[d][rix[r][d]], f[d], dw[d])) return 0;
    return 1;
  endfunction

  // longest prefix index of one field (reference LPM)
  function automatic int ref_lpm(int d, longint unsigned x);
    int best = -1;
    for (int i = 0; i < pv[d].size(); i++)
      if (pfx_has(pv[d][i], pl[d][i], x, dw[d]) && (best < 0 || pl[d][i] > pl[d][best]))
        best = i;
    return best;
  endfunction

  function automatic logic [KEY_W-1:0] pack_key(int c [ND]);
    key_t k;
    k.src_ip = PFX_IDX_W'(c[0]); k.dst_ip = PFX_IDX_W'(c[1]);
    k.src_port = PFX_IDX_W'(c[2]); k.dst_port = PFX_IDX_W'(c[3]);
    k.proto = PROTO_IDX_W'(c[4]);
    return k;
  endfunction

  // ---------------- pseudorule expansion and perfect hash ----------------
  logic [KEY_W-1:0] keys [$];
  int               ktgt [$];
  int               key_of [logic [KEY_W-1:0]];   // key -> target
  int unsigned      seed1, seed2;
  int               vval [int];
  int               n_reseed = 0;

  task automatic expand();
    int c [ND];
    keys.delete(); ktgt.delete(); key_of.delete();
    for (int i0 = 0; i0 < pv[0].size(); i0++)
    for (int i1 = 0; i1 < pv[1].size(); i1++)
    for (int i2 = 0; i2 < pv[2].size(); i2++)
    for (int i3 = 0; i3 < pv[3].size(); i3++)
    for (int i4 = 0; i4 < pv[4].size(); i4++) begin
      int t = -1;
      c = '{i0, i1, i2, i3, i4};
      for (int r = 1; r <= NR && t < 0; r++) begin
        bit ok = !spoiler[r];
        for (int d = 0; d < ND; d++)
          ok &= pfx_covers(pv[d][rix[r][d]], pl[d][rix[r][d]], pv[d][c[d]], pl[d][c[d]], dw[d]);
        if (ok) t = r;
      end
      if (t > 0) begin
        keys.push_back(pack_key(c));
        ktgt.push_back(t);
        key_of[pack_key(c)] = t;
      end
    end
  endtask

  function automatic int unsigned fh(logic [KEY_W-1:0] k, int unsigned s);
    logic [63:0] kk = 64'(k);
    return hashword(kk[31:0], kk[63:32], 0, 2, s) & ((1 << VI_W) - 1);
  endfunction

  int uf [int];
  function automatic int find(int x);
    while (uf[x] != x) x = uf[x];
    return x;
  endfunction

  task automatic build_phf(int unsigned first_seed);
    bit cyclic;
    seed1 = first_seed;
    seed2 = first_seed;   // equal seeds: every edge is a loop, forcing one re-seed
    forever begin
      cyclic = 0;
      uf.delete();
      foreach (keys[i]) begin
        int a = fh(keys[i], seed1), b = fh(keys[i], seed2);
        if (!uf.exists(a)) uf[a] = a;
        if (!uf.exists(b)) uf[b] = b;
        if (find(a) == find(b)) begin cyclic = 1; break; end
        uf[find(a)] = find(b);
      end
      if (!cyclic) break;
      n_reseed++;
      seed2 = seed2 * 32'd69069 + 32'd12345;
    end
    // assign vertex values tree by tree
    begin
      int adj [int][$];
      int q [$];
      vval.delete();
      foreach (keys[i]) begin
        adj[fh(keys[i], seed1)].push_back(i);
        adj[fh(keys[i], seed2)].push_back(i);
      end
      foreach (keys[i]) begin
        int root = fh(keys[i], seed1);
        if (vval.exists(root)) continue;
        vval[root] = 0;
        q.push_back(root);
        while (q.size() > 0) begin
          int u = q.pop_front();
          foreach (adj[u][j]) begin
            int e = adj[u][j];
            int a = fh(keys[e], seed1), b = fh(keys[e], seed2);
            int w = (a == u) ? b : a;
            if (!vval.exists(w)) begin
              vval[w] = (ktgt[e] - vval[u]) & ((1 << VERT_W) - 1);
              q.push_back(w);
            end
          end
        end
      end
    end
  endtask

  // ---------------- host writes ----------------
  int n_cfg_wait = 0;

  task automatic cfg_write(cfg_sel_e s, int unsigned a, logic [CFG_DATA_W-1:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_sel = s; cfg_addr = CFG_ADDR_W'(a); cfg_data = d;
    forever begin
      #1;
      if (cfg_ready) break;
      n_cfg_wait++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 cfg_valid = 0;
  endtask

  function automatic logic [CFG_DATA_W-1:0] pfx_word(bit vld, int l, longint unsigned v);
    logic [CFG_DATA_W-1:0] w = '0;
    w[31:0] = 32'(v); w[37:32] = 6'(l); w[38] = vld;
    return w;
  endfunction

  task automatic load_all(bit default_on);
    cfg_sel_e lsel [ND] = '{CFG_LPM_SRC_IP, CFG_LPM_DST_IP, CFG_LPM_SRC_PORT,
                            CFG_LPM_DST_PORT, CFG_LPM_PROTO};
    cfg_sel_e psel [4] = '{CFG_PFX_SRC_IP, CFG_PFX_DST_IP, CFG_PFX_SRC_PORT, CFG_PFX_DST_PORT};
    int ntc = 0;
    for (int d = 0; d < ND; d++)
      foreach (pv[d][i]) begin
        cfg_write(lsel[d], i, pfx_word(1, pl[d][i], pv[d][i]));
        if (d < 4) cfg_write(psel[d], i, pfx_word(1, pl[d][i], pv[d][i]));
      end
    for (int r = 1; r <= NR; r++) begin
      rule_entry_t e;
      e.valid = !spoiler[r];
      e.src_ip_idx = PFX_IDX_W'(rix[r][0]); e.dst_ip_idx = PFX_IDX_W'(rix[r][1]);
      e.src_port_idx = PFX_IDX_W'(rix[r][2]); e.dst_port_idx = PFX_IDX_W'(rix[r][3]);
      e.proto_any = pl[4][rix[r][4]] == 0;
      e.proto = PROTO_W'(pv[4][rix[r][4]]);
      cfg_write(CFG_RULE, r, CFG_DATA_W'(e));
    end
    for (int i = 0; i < 16; i++) begin
      tcam_entry_t t = '0;
      if (i < 16) begin
        // next spoiler, if any
        int r = 0, k = 0;
        for (int x = 1; x <= NR; x++) if (spoiler[x]) begin if (k == i) r = x; k++; end
        if (r != 0) begin
          header_t v, m;
          v = '{src_ip: 32'(pv[0][rix[r][0]]), dst_ip: 32'(pv[1][rix[r][1]]),
                src_port: 16'(pv[2][rix[r][2]]), dst_port: 16'(pv[3][rix[r][3]]),
                proto: 8'(pv[4][rix[r][4]])};
          m.src_ip = ~(32'hFFFF_FFFF >> pl[0][rix[r][0]]);
          m.dst_ip = ~(32'hFFFF_FFFF >> pl[1][rix[r][1]]);
          m.src_port = ~(16'hFFFF >> pl[2][rix[r][2]]);
          m.dst_port = ~(16'hFFFF >> pl[3][rix[r][3]]);
          m.proto = ~(8'hFF >> pl[4][rix[r][4]]);
          t = '{valid: 1'b1, rule: RULE_W'(r), mask: m, value: v};
          ntc++;
        end
      end
      cfg_write(CFG_TCAM, i, CFG_DATA_W'(t));
    end
    cfg_write(CFG_SEEDS, 0, CFG_DATA_W'({seed2, seed1}));
    cfg_write(CFG_DEFAULT, 0, CFG_DATA_W'({default_on, RULE_W'(UNIV)}));
    foreach (vval[v]) cfg_write(CFG_VERTEX, v, CFG_DATA_W'(vval[v]));
  endtask

  task automatic new_ruleset();
    for (int r = 1; r <= NR; r++) begin
      bit univ;
      do begin
        univ = 1;
        for (int d = 0; d < ND; d++) begin
          rix[r][d] = $urandom_range(pv[d].size() - 1);
          if (rix[r][d] != 0) univ = 0;
        end
      end while (univ);
      spoiler[r] = 0;
    end
    // rule 2 is a broad rule (one destination port, everything else wild):
    // the kind that spoils the expansion, so it goes to the TCAM
    rix[2] = '{0, 0, 0, $urandom_range(pv[3].size() - 1, 1), 0};
    spoiler[2] = 1;
    spoiler[NR - 5] = 1;
  endtask

  // ---------------- traffic and scoreboard ----------------
  typedef struct {
    header_t     hdr;
    result_src_e src;
    int          rule;
    int unsigned t;
  } exp_t;
  exp_t sb [$];

  int n_hash = 0, n_pseudo = 0, n_tcam = 0, n_tcam_over = 0, n_hash_over = 0;
  int n_reject = 0, n_none = 0, n_rate_ok = 0, n_lat_ok = 0, n_reload = 0;
  bit default_on = 1;
  int unsigned reads0;

  function automatic header_t gen_pkt();
    header_t h;
    h = '{src_ip: $urandom, dst_ip: $urandom, src_port: 16'($urandom),
          dst_port: 16'($urandom), proto: 8'($urandom)};
    if ($urandom_range(9) < 8) begin
      // inside a random rule: copy its prefix bits, keep the rest random
      int r = $urandom_range(NR, 1);
      longint unsigned f [ND];
      f = '{h.src_ip, h.dst_ip, h.src_port, h.dst_port, h.proto};
      for (int d = 0; d < ND; d++) begin
        int l = pl[d][rix[r][d]];
        longint unsigned m = (l == 0) ? 0 : (((64'd1 << l) - 1) << (dw[d] - l));
        f[d] = (f[d] & ~m) | (pv[d][rix[r][d]] & m);
      end
      if ($urandom_range(3) == 0) f[4] = 6;
      h = '{src_ip: 32'(f[0]), dst_ip: 32'(f[1]), src_port: 16'(f[2]),
            dst_port: 16'(f[3]), proto: 8'(f[4])};
    end
    return h;
  endfunction

  function automatic exp_t reference(header_t h);
    exp_t e;
    int best = 0;
    bit any_hashed = 0, any_spoiler = 0;
    for (int r = NR; r >= 1; r--)
      if (rule_hits(r, h)) begin
        best = r;
        if (spoiler[r]) any_spoiler = 1; else any_hashed = 1;
      end
    e.hdr = h;
    if (best != 0) begin
      e.src = spoiler[best] ? SRC_TCAM : SRC_HASH;
      e.rule = best;
    end else if (default_on) begin
      e.src = SRC_DEFAULT; e.rule = UNIV;
    end else begin
      e.src = SRC_NONE; e.rule = 0;
    end
    return e;
  endfunction

  // note which mechanism a packet exercises
  task automatic tally(exp_t e);
    bit any_h = 0, any_s = 0;
    for (int r = 1; r <= NR; r++)
      if (rule_hits(r, e.hdr)) begin if (spoiler[r]) any_s = 1; else any_h = 1; end
    case (e.src)
      SRC_HASH: begin
        int c [ND];
        longint unsigned f [ND];
        bit exact = 1;
        n_hash++;
        if (any_s) n_hash_over++;
        f = '{e.hdr.src_ip, e.hdr.dst_ip, e.hdr.src_port, e.hdr.dst_port, e.hdr.proto};
        for (int d = 0; d < ND; d++) begin
          c[d] = ref_lpm(d, f[d]);
          if (c[d] != rix[e.rule][d]) exact = 0;
        end
        if (!exact) n_pseudo++;
      end
      SRC_TCAM: begin n_tcam++; if (any_h) n_tcam_over++; end
      SRC_DEFAULT: n_reject++;
      default: n_none++;
    endcase
  endtask

  task automatic send(header_t h);
    exp_t e;
    @(negedge clk);
    in_valid = 1; in_hdr = h;
    forever begin
      #1;
      if (in_ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1;
    e = reference(h);
    e.t = cyc - 1;   // the cycle in which the header was presented
    sb.push_back(e);
    tally(e);
  endtask

  int unsigned last_acc = 0;
  bit          streaming = 0;
  bit          cfg_seen = 0;   // a host write happened since the last accept
  always @(posedge clk) begin
    if (in_valid && in_ready && rst_n) begin
      if (streaming && last_acc != 0 && !cfg_seen && !cfg_valid) begin
        checks++;
        if (cyc - last_acc == 1) n_rate_ok++;
        else begin failures++; $display("FAIL rate: accept gap %0d", cyc - last_acc); end
      end
      last_acc <= cyc;
      cfg_seen <= 0;
    end else if (cfg_valid) cfg_seen <= 1;
    if (!streaming) last_acc <= 0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (sb.size() == 0) begin
        failures++; $display("FAIL: result with nothing outstanding");
      end else begin
        e = sb.pop_front();
        if (out_src != 2'(e.src) || int'(out_rule) != e.rule || out_hdr != e.hdr) begin
          failures++;
          $display("FAIL hdr=%h: got src=%0d rule=%0d, expected src=%0d rule=%0d",
                   e.hdr, out_src, out_rule, e.src, e.rule);
        end
        checks++;
        if (cyc - e.t == LATENCY) n_lat_ok++;
        else begin failures++; $display("FAIL latency %0d", cyc - e.t); end
      end
    end
  end

  task automatic run_traffic(int n, bit with_vertex_writes);
    streaming = 1;
    fork
      for (int i = 0; i < n; i++) send(gen_pkt());
      if (with_vertex_writes)
        for (int i = 0; i < 8; i++) begin
          int a;
          do a = $urandom_range((1 << VI_W) - 1); while (vval.exists(a));
          repeat (50) @(posedge clk);
          cfg_write(CFG_VERTEX, a, CFG_DATA_W'($urandom));
        end
    join
    @(negedge clk);
    in_valid = 0;
    streaming = 0;
    repeat (LATENCY + 4) @(posedge clk);
  endtask

  initial begin
    repeat (10) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    reads0 = sram_reads();

    // ---- rule set 1 ----
    new_ruleset();
    expand();
    build_phf(32'h1234_5678);
    $display("rule set 1: %0d keys (rules + pseudorules), %0d vertices used, seeds %h %h",
             keys.size(), vval.num(), seed1, seed2);
    load_all(1);
    run_traffic(NPKT, 1);

    // ---- universal rule off: unmatched packets give no result ----
    default_on = 0;
    cfg_write(CFG_DEFAULT, 0, CFG_DATA_W'({1'b0, RULE_W'(UNIV)}));
    run_traffic(200, 0);
    default_on = 1;

    // ---- rule set 2: full recomputation and reload ----
    new_ruleset();
    expand();
    build_phf(32'h9E37_79B9);
    $display("rule set 2: %0d keys, %0d vertices used, seeds %h %h",
             keys.size(), vval.num(), seed1, seed2);
    load_all(1);
    n_reload++;
    run_traffic(NPKT, 0);

    checks++;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d results missing", sb.size()); end

    $display("mechanisms: hash=%0d pseudorule=%0d tcam=%0d tcam_over_hash=%0d hash_over_tcam=%0d",
             n_hash, n_pseudo, n_tcam, n_tcam_over, n_hash_over);
    $display("            rejected_to_default=%0d none=%0d vertex_write_waits=%0d reseeds=%0d reloads=%0d",
             n_reject, n_none, n_cfg_wait, n_reseed, n_reload);
    $display("            rate_ok=%0d latency_ok=%0d sram_reads=%0d",
             n_rate_ok, n_lat_ok, sram_reads());
    begin
      int cnt [11];
      cnt = '{n_hash, n_pseudo, n_tcam, n_tcam_over, n_hash_over, n_reject, n_none,
                       n_cfg_wait, n_reseed, n_reload, n_rate_ok};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
      end
    end
    // two SRAM reads per packet, no more: one on each chip
    checks++;
    if (sram_reads() - reads0 != 2 * (2 * NPKT + 200)) begin
      failures++;
      $display("FAIL: %0d SRAM reads for %0d packets", sram_reads() - reads0, 2 * NPKT + 200);
    end
    checks++;
    if (u_sram0.reads != u_sram1.reads) begin
      failures++;
      $display("FAIL: chip reads differ: %0d and %0d", u_sram0.reads, u_sram1.reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
