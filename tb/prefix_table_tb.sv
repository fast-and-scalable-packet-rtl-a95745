// prefix_table_tb: writes random prefixes to a 16-bit Prefix Table, reads
// them back in random order and checks data and the one-cycle read latency.
module prefix_table_tb;
  import pc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, wr_en = 0;
  logic [7:0] rd_addr = 0, wr_addr = 0;
  logic [5:0] rd_len, wr_len = 0;
  logic [15:0] rd_value, wr_value = 0;

  prefix_table #(.W(16), .IDX_W(8)) dut (.*);

  logic [5:0]  el [256];
  logic [15:0] ev [256];

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(i); wr_len = 6'($urandom_range(16)); wr_value = 16'($urandom);
      el[i] = wr_len; ev[i] = wr_value;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      automatic int a = $urandom_range(255);
      @(negedge clk);
      rd_en = 1; rd_addr = 8'(a);
      // a write to another address in the same cycle must not disturb the read
      wr_en = 1; wr_addr = 8'(a + 1); wr_len = 6'($urandom_range(16)); wr_value = 16'($urandom);
      el[8'(a + 1)] = wr_len; ev[8'(a + 1)] = wr_value;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_len != el[a] || rd_value != ev[a]) begin
        failures++;
        $display("FAIL addr %0d: got %0d/%h exp %0d/%h", a, rd_len, rd_value, el[a], ev[a]);
      end
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
