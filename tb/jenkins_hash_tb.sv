// jenkins_hash_tb: compares the combinational hash with an independent
// software model of lookup3 hashword() for random 36-bit keys and seeds,
// and for 96-bit keys (three words).
module jenkins_hash_tb;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [35:0] k36;
  logic [95:0] k96;
  logic [31:0] seed, h36, h96;

  jenkins_hash #(.KEY_W(36)) dut36 (.key(k36), .seed(seed), .hash(h36));
  jenkins_hash #(.KEY_W(96)) dut96 (.key(k96), .seed(seed), .hash(h96));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned e36, e96;
      k36  = {$urandom, $urandom};
      k96  = {$urandom, $urandom, $urandom};
      seed = (i < 4) ? 32'(i) : $urandom;
      #1;
      e36 = hashword(k36[31:0], 32'(k36[35:32]), 0, 2, seed);
      e96 = hashword(k96[31:0], k96[63:32], k96[95:64], 3, seed);
      checks += 2;
      if (h36 != e36) begin
        failures++; $display("FAIL key=%h seed=%h got %h exp %h", k36, seed, h36, e36);
      end
      if (h96 != e96) begin
        failures++; $display("FAIL key=%h seed=%h got %h exp %h", k96, seed, h96, e96);
      end
    end
    // the two seeds give different functions
    k36 = 36'h123456789; seed = 1; #1; e1 = h36; seed = 2; #1;
    checks++;
    if (h36 == e1) begin failures++; $display("FAIL: seed has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] e1;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
