// phf_tb: perfect hash unit with an SRAM model of latency 3.
// Two units are built, dut with one SRAM chip of 18-bit words and dut2 with
// two chips (NSRAM = 2) of 36-bit words holding two vertices each (VPW = 2,
// 19-bit vertex indices, both parts of each used word written); the sequence below runs on dut, then on dut2 (one
// key every cycle, latency SRAM latency + 2, one read on each chip per key).
//  1. The worked example of the method: a key whose f1 vertex holds 2 and
//     whose f2 vertex holds -1 must give rule 1.
//  2. After re-seeding, 300 random keys: their vertices get random signed
//     values (written through the unit's write port) and the keys are then
//     streamed back to back; each result must be (v1 + v2) mod 2**10, in
//     order, SRAM latency + 3 cycles after the key, one key every 2 cycles,
//     two SRAM reads per key.
//  3. Vertex writes requested during streaming must wait for idle cycles.
module phf_tb;
  import pc_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 3;
  localparam int AW  = 18;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic seed_we = 0;
  logic [31:0] seed1_in = 0, seed2_in = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic [KEY_W-1:0] in_key = 0;
  logic [RULE_W-1:0] out_rule;
  logic wr_req = 0, wr_ack;
  logic [AW:0] wr_addr = 0;   // vertex index; dut uses the low AW bits
  logic [VERT_W-1:0] wr_data = 0;

  bit dual = 0;   // 0: drive and check dut, 1: dut2
  int lat_exp, gap_exp;
  assign lat_exp = dual ? LAT + 2 : LAT + 3;
  assign gap_exp = dual ? 1 : 2;

  // dut: one SRAM chip
  logic in_ready1, out_valid1, wr_ack1;
  logic [RULE_W-1:0] out_rule1;
  logic [0:0] sram_rd, sram_wr, sram_rvalid;
  logic [0:0][AW-1:0] sram_addr;
  logic [0:0][VERT_W-1:0] sram_wdata, sram_rdata;
  logic [0:0][0:0] sram_wpart;

  phf #(.VADDR_W(AW), .SRAM_LAT(LAT)) dut (
    .clk, .rst_n, .seed_we, .seed1_in, .seed2_in,
    .in_valid(in_valid && !dual), .in_ready(in_ready1), .in_key,
    .out_valid(out_valid1), .out_rule(out_rule1),
    .wr_req(wr_req && !dual), .wr_addr(wr_addr[AW-1:0]), .wr_data, .wr_ack(wr_ack1),
    .sram_rd, .sram_wr, .sram_addr, .sram_wdata, .sram_wpart, .sram_rvalid, .sram_rdata);
  sram_model #(.AW(AW), .DW(VERT_W), .LAT(LAT)) u_sram (
    .clk, .rd(sram_rd[0]), .wr(sram_wr[0]), .addr(sram_addr[0]), .wdata(sram_wdata[0]),
    .wpart(sram_wpart[0]),
    .rvalid(sram_rvalid[0]), .rdata(sram_rdata[0]));

  // dut2: two SRAM chips
  logic in_ready2, out_valid2, wr_ack2;
  logic [RULE_W-1:0] out_rule2;
  logic [1:0] sram2_rd, sram2_wr, sram2_rvalid;
  logic [1:0][AW-1:0] sram2_addr;
  logic [1:0][2*VERT_W-1:0] sram2_wdata, sram2_rdata;
  logic [1:0][1:0] sram2_wpart;

  phf #(.VADDR_W(AW), .NSRAM(2), .VPW(2), .SRAM_LAT(LAT)) dut2 (
    .clk, .rst_n, .seed_we, .seed1_in, .seed2_in,
    .in_valid(in_valid && dual), .in_ready(in_ready2), .in_key,
    .out_valid(out_valid2), .out_rule(out_rule2),
    .wr_req(wr_req && dual), .wr_addr, .wr_data, .wr_ack(wr_ack2),
    .sram_rd(sram2_rd), .sram_wr(sram2_wr), .sram_addr(sram2_addr),
    .sram_wdata(sram2_wdata), .sram_wpart(sram2_wpart), .sram_rvalid(sram2_rvalid), .sram_rdata(sram2_rdata));
  sram_model #(.AW(AW), .DW(2*VERT_W), .LAT(LAT), .PARTS(2)) u_sram2a (
    .clk, .rd(sram2_rd[0]), .wr(sram2_wr[0]), .addr(sram2_addr[0]), .wdata(sram2_wdata[0]),
    .wpart(sram2_wpart[0]),
    .rvalid(sram2_rvalid[0]), .rdata(sram2_rdata[0]));
  sram_model #(.AW(AW), .DW(2*VERT_W), .LAT(LAT), .PARTS(2)) u_sram2b (
    .clk, .rd(sram2_rd[1]), .wr(sram2_wr[1]), .addr(sram2_addr[1]), .wdata(sram2_wdata[1]),
    .wpart(sram2_wpart[1]),
    .rvalid(sram2_rvalid[1]), .rdata(sram2_rdata[1]));

  assign in_ready  = dual ? in_ready2  : in_ready1;
  assign out_valid = dual ? out_valid2 : out_valid1;
  assign out_rule  = dual ? out_rule2  : out_rule1;
  assign wr_ack    = dual ? wr_ack2    : wr_ack1;

  function automatic int unsigned sram_reads();
    return dual ? u_sram2a.reads + u_sram2b.reads : u_sram.reads;
  endfunction

  always @(negedge clk)
    if (rst_n && (dual ? out_valid1 : out_valid2)) begin
      failures++;
      $display("FAIL: result from the idle unit");
    end

  int unsigned s1 = 1, s2 = 2;   // reset seeds
  int vmem [int];
  int n_wait = 0;
  bit wrote = 0;   // a vertex write took a slot since the last key

  function automatic int unsigned fa(logic [KEY_W-1:0] k, int unsigned s);
    logic [63:0] kk = 64'(k);
    return hashword(kk[31:0], kk[63:32], 0, 2, s) & ((1 << (dual ? AW + 1 : AW)) - 1);
  endfunction

  task automatic vwrite(int a, int v);
    @(negedge clk);
    wr_req = 1; wr_addr = (AW + 1)'(a); wr_data = VERT_W'(v);
    forever begin
      #1;
      if (wr_ack) break;
      n_wait++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 wr_req = 0;
    vmem[a] = v & ((1 << VERT_W) - 1);
    wrote = 1;
  endtask

  typedef struct { int rule; int unsigned t; } exp_t;
  exp_t sb [$];
  int unsigned last_t = 0;
  bit back_to_back = 0;
  int n_out = 0;

  task automatic send(logic [KEY_W-1:0] k);
    exp_t e;
    // the unit needs keys only when in_ready is high (no valid/ready wait)
    @(negedge clk);
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    in_valid = 1; in_key = k;
    @(posedge clk);
    #1 in_valid = 0;
    e.rule = (vmem[fa(k, s1)] + vmem[fa(k, s2)]) & ((1 << RULE_W) - 1);
    e.t = cyc - 1;   // the cycle in which the key was presented
    if (back_to_back && last_t != 0 && !wrote) begin
      checks++;
      if (cyc - last_t != gap_exp) begin failures++; $display("FAIL: key gap %0d", cyc - last_t); end
    end
    last_t = cyc;
    wrote = 0;
    sb.push_back(e);
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    n_out++;
    if (sb.size() == 0) begin failures++; $display("FAIL: unexpected result"); end
    else begin
      e = sb.pop_front();
      if (int'(out_rule) != e.rule || cyc - e.t != lat_exp) begin
        failures++;
        $display("FAIL: rule %0d exp %0d, latency %0d exp %0d", out_rule, e.rule, cyc - e.t, lat_exp);
      end
    end
  end

  logic [KEY_W-1:0] ks [300];

  task automatic run_all();
    int unsigned reads0;
    n_out = 0; n_wait = 0; back_to_back = 0;
    vmem.delete();
    s1 = 1; s2 = 2;
    @(negedge clk) seed_we = 1; seed1_in = s1; seed2_in = s2;
    @(negedge clk) seed_we = 0;
    // 1. the worked example: f1 vertex = 2, f2 vertex = -1, sum = rule 1
    ks[0] = 36'h5_0000_0002;
    if (fa(ks[0], s1) == fa(ks[0], s2)) ks[0] = 36'h5_0000_0003;
    vwrite(fa(ks[0], s1), 2);
    vwrite(fa(ks[0], s2), -1);
    send(ks[0]);
    repeat (LAT + 6) @(posedge clk);
    checks++;
    if (n_out != 1) begin failures++; $display("FAIL: example gave no result"); end

    // 2. re-seed, random keys and vertex values, streaming
    @(negedge clk) seed_we = 1; seed1_in = 32'hCAFE_0001; seed2_in = 32'h0BAD_F00D;
    @(negedge clk) seed_we = 0;
    s1 = 32'hCAFE_0001; s2 = 32'h0BAD_F00D;
    foreach (ks[i]) begin
      ks[i] = {$urandom, $urandom};
      vwrite(fa(ks[i], s1), $urandom_range((1 << VERT_W) - 1));
      vwrite(fa(ks[i], s2), $urandom_range((1 << VERT_W) - 1));
      // two vertices per word: fill the other part of both words too, so a
      // write that spoils its neighbour shows up as a wrong sum
      if (dual) begin
        int a1 = fa(ks[i], s1) ^ 1, a2 = fa(ks[i], s2) ^ 1;
        if (!vmem.exists(a1)) vwrite(a1, $urandom_range((1 << VERT_W) - 1));
        if (!vmem.exists(a2)) vwrite(a2, $urandom_range((1 << VERT_W) - 1));
      end
    end
    reads0 = sram_reads();
    back_to_back = 1;
    last_t = 0;
    fork
      foreach (ks[i]) send(ks[i]);
      // 3. writes to unused vertices while keys stream
      begin
        repeat (20) @(posedge clk);
        for (int i = 0; i < 5; i++) begin
          int a;
          do a = $urandom_range((1 << (dual ? AW + 1 : AW)) - 1); while (vmem.exists(a));
          vwrite(a, 5);
        end
      end
    join
    repeat (LAT + 6) @(posedge clk);
    checks += 3;
    if (sb.size() != 0) begin failures++; $display("FAIL: %0d results missing", sb.size()); end
    if (n_wait == 0) begin failures++; $display("FAIL: no write ever waited"); end
    if (sram_reads() - reads0 != 2 * 300) begin
      failures++; $display("FAIL: %0d SRAM reads for 300 keys", sram_reads() - reads0);
    end
    if (dual) begin
      checks++;
      if (u_sram2a.reads != u_sram2b.reads) begin
        failures++; $display("FAIL: chip reads differ");
      end
    end
  endtask

  initial begin
    repeat (10) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_all();
    @(negedge clk) dual = 1;
    run_all();
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
