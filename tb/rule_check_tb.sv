// rule_check_tb: loads four Prefix Tables with random prefixes and the Rule
// Table with random rules (some invalid, some with a wildcard protocol), then
// streams one (rule number, header) pair per cycle. Headers are built inside
// the rule, inside it with one field or the protocol disturbed, or random.
// out_match, out_rule and out_hdr are checked against a reference, with the
// three-cycle latency.
module rule_check_tb;
  import pc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, out_valid, out_match;
  logic [RULE_W-1:0] in_rule = 0, out_rule;
  header_t in_hdr = '0, out_hdr;
  logic rt_wr_en = 0;
  logic [RULE_W-1:0] rt_wr_addr = 0;
  rule_entry_t rt_wr_data = '0;
  logic [3:0] pt_wr_en = 0;
  logic [PFX_IDX_W-1:0] pt_wr_addr = 0;
  logic [LEN_W-1:0] pt_wr_len = 0;
  logic [IP_W-1:0] pt_wr_value = 0;

  rule_check dut (.*);

  localparam int NP = 20, NRL = 100;
  int          dw [4] = '{32, 32, 16, 16};
  int          plen [4][NP];
  int unsigned pval [4][NP];
  rule_entry_t rules [NRL];

  function automatic bit ref_match(int r, header_t h);
    rule_entry_t e = rules[r];
    int unsigned f [4];
    int ix [4];
    if (!e.valid) return 0;
    f = '{h.src_ip, h.dst_ip, 32'(h.src_port), 32'(h.dst_port)};
    ix = '{e.src_ip_idx, e.dst_ip_idx, e.src_port_idx, e.dst_port_idx};
    for (int d = 0; d < 4; d++)
      if (!pfx_has(pval[d][ix[d]], plen[d][ix[d]], f[d], dw[d])) return 0;
    return e.proto_any || e.proto == h.proto;
  endfunction

  typedef struct { bit m; int r; header_t h; int unsigned t; } exp_t;
  exp_t sb [$];
  int n_match = 0, n_nomatch = 0;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (sb.size() == 0) begin failures++; $display("FAIL: unexpected result"); end
    else begin
      e = sb.pop_front();
      if (out_match != e.m || int'(out_rule) != e.r || out_hdr != e.h || cyc - e.t != 3) begin
        failures++;
        $display("FAIL rule %0d: match %b exp %b, latency %0d", e.r, out_match, e.m, cyc - e.t);
      end
      if (e.m) n_match++; else n_nomatch++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int d = 0; d < 4; d++)
      for (int i = 0; i < NP; i++) begin
        automatic int l = (i == 0) ? 0 : $urandom_range(dw[d], 1);
        automatic int unsigned v = $urandom & ~(32'hFFFF_FFFF >> l);
        if (dw[d] == 16) v = (v >> 16);
        plen[d][i] = l; pval[d][i] = v;
        @(negedge clk);
        pt_wr_en = 4'(1 << d); pt_wr_addr = PFX_IDX_W'(i); pt_wr_len = LEN_W'(l); pt_wr_value = v;
      end
    @(negedge clk) pt_wr_en = 0;
    for (int r = 0; r < NRL; r++) begin
      rules[r].valid = $urandom_range(9) != 0;
      rules[r].src_ip_idx = PFX_IDX_W'($urandom_range(NP - 1));
      rules[r].dst_ip_idx = PFX_IDX_W'($urandom_range(NP - 1));
      rules[r].src_port_idx = PFX_IDX_W'($urandom_range(NP - 1));
      rules[r].dst_port_idx = PFX_IDX_W'($urandom_range(NP - 1));
      rules[r].proto_any = $urandom_range(1);
      rules[r].proto = 8'($urandom_range(2) == 0 ? 17 : 6);
      @(negedge clk) rt_wr_en = 1; rt_wr_addr = RULE_W'(r); rt_wr_data = rules[r];
    end
    @(negedge clk) rt_wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      automatic int r = $urandom_range(NRL - 1);
      automatic header_t h = header_t'({$urandom, $urandom, $urandom, $urandom});
      if (n % 5 != 0) begin
        int ix [4];
        int unsigned f [4];
        ix = '{rules[r].src_ip_idx, rules[r].dst_ip_idx, rules[r].src_port_idx,
               rules[r].dst_port_idx};
        f = '{h.src_ip, h.dst_ip, 32'(h.src_port), 32'(h.dst_port)};
        for (int d = 0; d < 4; d++) begin
          automatic int unsigned m = (plen[d][ix[d]] == 0) ? 0 :
                           ((32'hFFFF_FFFF << (dw[d] - plen[d][ix[d]])) & (dw[d] == 16 ? 32'hFFFF : 32'hFFFF_FFFF));
          f[d] = (f[d] & ~m) | pval[d][ix[d]];
        end
        if (n % 5 == 1) f[$urandom_range(3)] ^= 32'h1 << $urandom_range(15);
        h.src_ip = f[0]; h.dst_ip = f[1]; h.src_port = 16'(f[2]); h.dst_port = 16'(f[3]);
        h.proto = (n % 7 == 0) ? 8'd1 : rules[r].proto;
      end
      @(negedge clk);
      in_valid = 1; in_rule = RULE_W'(r); in_hdr = h;
      @(posedge clk);
      #1;
      e.m = ref_match(r, h); e.r = r; e.h = h; e.t = cyc - 1;
      sb.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks += 2;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d results missing", sb.size()); end
    if (n_match == 0 || n_nomatch == 0) begin
      failures++; $display("FAIL: coverage match %0d nomatch %0d", n_match, n_nomatch);
    end
    $display("matches %0d, rejections %0d", n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
