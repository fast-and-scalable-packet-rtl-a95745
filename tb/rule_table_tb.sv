// rule_table_tb: writes random compressed rule entries, some marked invalid,
// and reads rule numbers in random order; never-written numbers must read as
// invalid after reset. Checks data and the one-cycle read latency.
module rule_table_tb;
  import pc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, wr_en = 0;
  logic [RULE_W-1:0] rd_addr = 0, wr_addr = 0;
  rule_entry_t rd_data, wr_data = '0;

  rule_table dut (.*);

  rule_entry_t exp_e [int];
  int n_valid = 0, n_invalid = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(1023);
      rule_entry_t e;
      e = rule_entry_t'({$urandom, $urandom});
      e.valid = $urandom_range(4) != 0;
      @(negedge clk);
      wr_en = 1; wr_addr = RULE_W'(a); wr_data = e;
      exp_e[a] = e;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int a = (i % 2) ? $urandom_range(1023) : 0;
      if (i % 2 == 0) begin
        automatic int k = $urandom_range(exp_e.num() - 1);
        void'(exp_e.first(a));
        repeat (k) void'(exp_e.next(a));
      end
      @(negedge clk);
      rd_en = 1; rd_addr = RULE_W'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (exp_e.exists(a)) begin
        if (rd_data != exp_e[a]) begin
          failures++; $display("FAIL rule %0d: got %h exp %h", a, rd_data, exp_e[a]);
        end
        if (exp_e[a].valid) n_valid++; else n_invalid++;
      end else begin
        if (rd_data.valid) begin failures++; $display("FAIL rule %0d never written but valid", a); end
        n_invalid++;
      end
    end
    checks += 2;
    if (n_valid == 0 || n_invalid == 0) begin
      failures++; $display("FAIL: valid %0d invalid %0d", n_valid, n_invalid);
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
