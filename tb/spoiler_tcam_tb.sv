// spoiler_tcam_tb: fills the 16 entries with random prefix-shaped value/mask
// pairs and random rule numbers, then checks lookups of headers made to hit
// one or more entries (and of random headers) against a reference search that
// returns the smallest matching rule number. Checks the one-cycle latency.
module spoiler_tcam_tb;
  import pc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_hit, wr_en = 0;
  header_t in_hdr = '0;
  logic [RULE_W-1:0] out_rule;
  logic [3:0] wr_addr = 0;
  tcam_entry_t wr_data = '0;

  spoiler_tcam dut (.*);

  tcam_entry_t ent [16];
  int n_hit = 0, n_multi = 0, n_miss = 0;

  function automatic header_t pmask(int a, int b, int c, int d, int e);
    header_t m;
    m.src_ip = ~(32'hFFFF_FFFF >> a); m.dst_ip = ~(32'hFFFF_FFFF >> b);
    m.src_port = ~(16'hFFFF >> c); m.dst_port = ~(16'hFFFF >> d); m.proto = ~(8'hFF >> e);
    return m;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // empty TCAM after reset: no hits
    @(negedge clk) in_valid = 1; in_hdr = header_t'({$urandom, $urandom, $urandom, $urandom});
    @(negedge clk) in_valid = 0;
    checks++;
    if (!out_valid || out_hit) begin failures++; $display("FAIL: hit in empty TCAM"); end
    for (int i = 0; i < 16; i++) begin
      header_t m;
      m = pmask($urandom_range(3) * 8, $urandom_range(4) * 8, $urandom_range(1) * 16,
                $urandom_range(1) * 16, $urandom_range(1) * 8);
      ent[i].valid = (i != 7);
      ent[i].rule = RULE_W'($urandom_range(1023));
      ent[i].mask = m;
      ent[i].value = header_t'({$urandom, $urandom, $urandom, $urandom}) & m;
      @(negedge clk) wr_en = 1; wr_addr = 4'(i); wr_data = ent[i];
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      header_t h;
      automatic int k = $urandom_range(15), nh = 0, best = -1;
      h = header_t'({$urandom, $urandom, $urandom, $urandom});
      if (n % 4 != 0) h = (h & ~ent[k].mask) | ent[k].value;
      for (int i = 0; i < 16; i++)
        if (ent[i].valid && ((h ^ ent[i].value) & ent[i].mask) == '0) begin
          nh++;
          if (best < 0 || ent[i].rule < best) best = ent[i].rule;
        end
      @(negedge clk) in_valid = 1; in_hdr = h;
      @(negedge clk) in_valid = 0;
      checks++;
      if (!out_valid || out_hit != (nh > 0) || (nh > 0 && int'(out_rule) != best)) begin
        failures++;
        $display("FAIL hdr %h: got %b/%0d exp %0d/%0d", h, out_hit, out_rule, nh, best);
      end
      if (nh == 0) n_miss++; else if (nh == 1) n_hit++; else n_multi++;
    end
    checks++;
    if (n_hit == 0 || n_multi == 0 || n_miss == 0) begin
      failures++; $display("FAIL: coverage hit %0d multi %0d miss %0d", n_hit, n_multi, n_miss);
    end
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
