// pkt_classifier_workload_tb: the classifier, at its default parameters, under
// a rule set the size of a published firewall rule set: 171 rules with 84
// distinct source address prefixes, 84 destination address prefixes, one
// source port prefix, 6 destination port prefixes and 3 protocol values.
//
// The testbench plays the host:
//   1. draws the prefixes (mostly /24 and /32 host and subnet addresses, one
//      wildcard per field) and 171 random rules over them,
//   2. moves the 16 rules that would create the most label combinations
//      (broad rules, "spoilers") to the TCAM,
//   3. expands pseudorules with one coverage bit vector per prefix and field:
//      the target of a label combination is the lowest set bit of the AND of
//      its five vectors,
//   4. builds the perfect hash over all keys (tens of thousands of vertices of
//      the 262144 in the Vertex Table), loads every table through the
//      configuration port, and
//   5. streams packets back to back, checking each result against a
//      linear-search reference, the latency (SRAM_LAT + 8), the one-in-two
//      cycles accept rate and two SRAM reads per packet; then once more with
//      the universal rule disabled.
// It counts hash hits, pseudorule hits, TCAM hits, TCAM beating the hash path,
// packets rejected by the rule check and packets with no match, and counts a
// failure for any that never happened.
module pkt_classifier_workload_tb;
  import pc_pkg::*;
  import tb_ref_pkg::*;

  localparam int SRAM_LAT = 2;        // the top's default
  localparam int VA_W     = 18;       // the top's default
  localparam int LATENCY  = SRAM_LAT + 8;  // cycles from the input cycle to the output cycle
  localparam int ND       = 5;
  localparam int NR       = 171;      // rules (1..NR)
  localparam int NPFX [5] = '{84, 84, 1, 6, 3};  // distinct prefixes per field
  localparam int NSPOIL   = 16;       // TCAM entries
  localparam int MAXKEYS  = 60000;    // keep the hash graph sparse (acyclic with high probability)
  localparam int UNIV     = NR + 1;   // number of the universal rule
  localparam int NPKT     = 3000;     // packets

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
  logic [0:0]            sram_rd, sram_wr, sram_rvalid;   // one SRAM chip
  logic [0:0][VA_W-1:0]   sram_addr;
  logic [0:0][VERT_W-1:0] sram_wdata, sram_rdata;
  logic [0:0][0:0]        sram_wpart;

  pkt_classifier dut (.*);

  sram_model #(.AW(VA_W), .DW(VERT_W), .LAT(SRAM_LAT)) u_sram (
    .clk, .rd(sram_rd[0]), .wr(sram_wr[0]), .addr(sram_addr[0]), .wdata(sram_wdata[0]),
    .wpart(sram_wpart[0]), .rvalid(sram_rvalid[0]), .rdata(sram_rdata[0]));

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

  // Distinct prefixes of every field; index 0 is the wildcard.
  task automatic gen_prefixes();
    for (int d = 0; d < ND; d++) begin
      pv[d].delete(); pl[d].delete();
      add_pfx(d, 0, 0);
      while (pv[d].size() < NPFX[d]) begin
        int l;
        longint unsigned v;
        bit dup = 0;
        case (d)
          0, 1: begin
            int pick = $urandom_range(9);
            l = pick < 4 ? 32 : pick < 8 ? 24 : pick < 9 ? 16 : 8;
          end
          2, 3: l = $urandom_range(9) < 7 ? 16 : 8;
          default: l = 8;
        endcase
        v = longint'($urandom) & ((64'd1 << dw[d]) - 1);
        if (d == 4) v = (pv[d].size() == 1) ? 6 : 17;
        v &= ~((64'd1 << (dw[d] - l)) - 1);
        foreach (pv[d][i]) if (pv[d][i] == v && pl[d][i] == l) dup = 1;
        if (!dup) add_pfx(d, v, l);
      end
    end
  endtask

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

  // cov[d][i] bit r: rule r's field-d prefix covers prefix i of field d
  typedef bit [255:0] rset_t;
  rset_t cov [ND][$];

  task automatic expand();
    int c [ND];
    keys.delete(); ktgt.delete(); key_of.delete();
    for (int d = 0; d < ND; d++) begin
      cov[d].delete();
      foreach (pv[d][i]) begin
        rset_t m = '0;
        for (int r = 1; r <= NR; r++)
          if (!spoiler[r] &&
              pfx_covers(pv[d][rix[r][d]], pl[d][rix[r][d]], pv[d][i], pl[d][i], dw[d]))
            m[r] = 1'b1;
        cov[d].push_back(m);
      end
    end
    for (int i0 = 0; i0 < pv[0].size(); i0++)
    for (int i1 = 0; i1 < pv[1].size(); i1++) begin
      rset_t m01 = cov[0][i0] & cov[1][i1];
      if (m01 == '0) continue;
      for (int i2 = 0; i2 < pv[2].size(); i2++)
      for (int i3 = 0; i3 < pv[3].size(); i3++)
      for (int i4 = 0; i4 < pv[4].size(); i4++) begin
        rset_t m = m01 & cov[2][i2] & cov[3][i3] & cov[4][i4];
        if (m != '0) begin
          int t = 1;
          while (!m[t]) t++;
          c = '{i0, i1, i2, i3, i4};
          keys.push_back(pack_key(c));
          ktgt.push_back(t);
          key_of[pack_key(c)] = t;
        end
      end
    end
  endtask

  function automatic int unsigned fh(logic [KEY_W-1:0] k, int unsigned s);
    logic [63:0] kk = 64'(k);
    return hashword(kk[31:0], kk[63:32], 0, 2, s) & ((1 << VA_W) - 1);
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

  // label combinations a rule covers (its pseudorule count plus one)
  function automatic longint combos(int r);
    longint n = 1;
    for (int d = 0; d < ND; d++) begin
      int k = 0;
      foreach (pv[d][i])
        if (pfx_covers(pv[d][rix[r][d]], pl[d][rix[r][d]], pv[d][i], pl[d][i], dw[d])) k++;
      n *= k;
    end
    return n;
  endfunction

  task automatic new_ruleset();
    longint cnt [NR+1];
    for (int r = 1; r <= NR; r++) begin
      rix[r][0] = $urandom_range(99) < 30 ? 0 : $urandom_range(pv[0].size() - 1, 1);
      rix[r][1] = $urandom_range(99) < 30 ? 0 : $urandom_range(pv[1].size() - 1, 1);
      rix[r][2] = 0;
      rix[r][3] = $urandom_range(99) < 50 ? 0 : $urandom_range(pv[3].size() - 1, 1);
      rix[r][4] = $urandom_range(99) < 30 ? 0 : $urandom_range(pv[4].size() - 1, 1);
      if (rix[r][0] == 0 && rix[r][1] == 0 && rix[r][3] == 0 && rix[r][4] == 0)
        rix[r][1] = $urandom_range(pv[1].size() - 1, 1);
      spoiler[r] = 0;
      cnt[r] = combos(r);
    end
    // the NSPOIL broadest rules go to the TCAM
    for (int k = 0; k < NSPOIL; k++) begin
      int best = 0;
      for (int r = 1; r <= NR; r++)
        if (!spoiler[r] && (best == 0 || cnt[r] > cnt[best])) best = r;
      spoiler[best] = 1;
    end
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
        if (cyc - last_acc == 2) n_rate_ok++;
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
          do a = $urandom_range((1 << VA_W) - 1); while (vval.exists(a));
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
    reads0 = u_sram.reads;

    gen_prefixes();
    new_ruleset();
    expand();
    checks++;
    if (keys.size() > MAXKEYS) begin
      failures++; $display("FAIL: %0d keys, more than %0d", keys.size(), MAXKEYS);
    end
    build_phf(32'h2545_F491);
    $display("%0d rules, %0d spoilers, %0d keys (rules + pseudorules), %0d vertices used, seeds %h %h",
             NR, NSPOIL, keys.size(), vval.num(), seed1, seed2);
    load_all(1);
    run_traffic(NPKT, 0);

    // universal rule off: unmatched packets give no result
    default_on = 0;
    cfg_write(CFG_DEFAULT, 0, CFG_DATA_W'({1'b0, RULE_W'(UNIV)}));
    run_traffic(500, 0);

    checks++;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d results missing", sb.size()); end

    $display("mechanisms: hash=%0d pseudorule=%0d tcam=%0d tcam_over_hash=%0d hash_over_tcam=%0d",
             n_hash, n_pseudo, n_tcam, n_tcam_over, n_hash_over);
    $display("            rejected_to_default=%0d none=%0d reseeds=%0d",
             n_reject, n_none, n_reseed);
    $display("            rate_ok=%0d latency_ok=%0d sram_reads=%0d",
             n_rate_ok, n_lat_ok, u_sram.reads);
    begin
      int cnt [7];
      cnt = '{n_hash, n_pseudo, n_tcam, n_tcam_over, n_reject, n_none, n_rate_ok};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
      end
    end
    // two SRAM reads per packet, no more
    checks++;
    if (u_sram.reads - reads0 != 2 * (NPKT + 500)) begin
      failures++;
      $display("FAIL: %0d SRAM reads for %0d packets", u_sram.reads - reads0, NPKT + 500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
