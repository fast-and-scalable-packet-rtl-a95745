// lpm_tb: loads random prefixes (nested and overlapping, plus a default
// route) into a 32-bit LPM and checks random lookups against a reference
// longest-match search, including the one-cycle latency, a miss when no
// prefix matches, and entry invalidation.
module lpm_tb;
  import pc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_hit;
  logic [31:0] in_field = 0;
  logic [7:0] out_label;
  logic wr_en = 0, wr_valid = 0;
  logic [7:0] wr_addr = 0;
  logic [5:0] wr_len = 0;
  logic [31:0] wr_value = 0;

  lpm #(.W(32), .IDX_W(8)) dut (.*);

  localparam int N = 60;
  bit          rv [N];
  int          rl [N];
  int unsigned rp [N];

  task automatic wr(int a, bit v, int l, int unsigned p);
    @(negedge clk);
    wr_en = 1; wr_addr = 8'(a); wr_valid = v; wr_len = 6'(l); wr_value = p;
    @(negedge clk);
    wr_en = 0;
    rv[a] = v; rl[a] = l; rp[a] = p;
  endtask

  function automatic int ref_best(int unsigned x);
    int b = -1;
    for (int i = 0; i < N; i++)
      if (rv[i] && pfx_has(rp[i], rl[i], x, 32) && (b < 0 || rl[i] > rl[b])) b = i;
    return b;
  endfunction

  int n_hit = 0, n_miss = 0;

  task automatic lookup(int unsigned x);
    int b;
    @(negedge clk);
    in_valid = 1; in_field = x;
    @(negedge clk);
    in_valid = 0;
    b = ref_best(x);
    checks++;
    if (!out_valid || out_hit != (b >= 0) || (b >= 0 && int'(out_label) != b)) begin
      failures++;
      $display("FAIL x=%h got hit=%b label=%0d exp %0d", x, out_hit, out_label, b);
    end
    if (b >= 0) n_hit++; else n_miss++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // nested prefixes under 10.0.0.0/8, no default route yet
    for (int i = 0; i < N; i++) begin
      automatic int l = $urandom_range(32, 8);
      automatic int unsigned p = {8'h0A, 24'($urandom_range(3))} << 16 | ($urandom & 32'h0000_FFFF);
      p = p & ~(32'hFFFF_FFFF >> l);
      wr(i, 1, l, p);
    end
    for (int i = 0; i < 800; i++) begin
      int unsigned x;
      automatic int k = $urandom_range(N - 1);
      case ($urandom_range(2))
        0: x = rp[k] | ($urandom & (32'hFFFF_FFFF >> rl[k]));   // inside a prefix
        1: x = rp[k] ^ (32'h1 << $urandom_range(31));            // near a prefix
        default: x = $urandom;                                  // anywhere
      endcase
      lookup(x);
    end
    // add a default route and invalidate some entries
    wr(N - 1, 1, 0, 0);
    for (int i = 0; i < 10; i++) wr(i, 0, rl[i], rp[i]);
    for (int i = 0; i < 400; i++) begin
      automatic int k = $urandom_range(N - 1);
      lookup(i % 2 ? $urandom : (rp[k] | ($urandom & (32'hFFFF_FFFF >> rl[k]))));
    end
    checks += 2;
    if (n_hit == 0) begin failures++; $display("FAIL: no hits"); end
    if (n_miss == 0) begin failures++; $display("FAIL: no misses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
