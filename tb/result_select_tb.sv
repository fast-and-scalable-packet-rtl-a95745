// result_select_tb: random hash/TCAM/universal-rule combinations against a
// reference priority decision; checks the one-cycle latency.
module result_select_tb;
  import pc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, hash_match = 0, tcam_hit = 0, default_valid = 0;
  logic [RULE_W-1:0] hash_rule = 0, tcam_rule = 0, default_rule = 0;
  logic out_valid;
  result_src_e out_src;
  logic [RULE_W-1:0] out_rule;
  int seen [4];

  result_select dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      result_src_e es;
      int er;
      @(negedge clk);
      in_valid = 1;
      hash_match = $urandom_range(1); tcam_hit = $urandom_range(1);
      default_valid = $urandom_range(3) != 0;
      hash_rule = RULE_W'($urandom_range(i % 2 ? 15 : 1023));
      tcam_rule = RULE_W'($urandom_range(i % 2 ? 15 : 1023));
      default_rule = RULE_W'($urandom);
      if (hash_match && tcam_hit) begin
        es = (hash_rule < tcam_rule) ? SRC_HASH : SRC_TCAM;
        er = (hash_rule < tcam_rule) ? hash_rule : tcam_rule;
      end else if (hash_match) begin es = SRC_HASH; er = hash_rule; end
      else if (tcam_hit) begin es = SRC_TCAM; er = tcam_rule; end
      else if (default_valid) begin es = SRC_DEFAULT; er = default_rule; end
      else begin es = SRC_NONE; er = 0; end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_src != es || int'(out_rule) != er) begin
        failures++;
        $display("FAIL h=%b/%0d t=%b/%0d d=%b/%0d: got %0d/%0d exp %0d/%0d", hash_match, hash_rule,
                 tcam_hit, tcam_rule, default_valid, default_rule, out_src, out_rule, es, er);
      end
      seen[es]++;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid without input"); end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL: source %0d never chosen", i); end
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
