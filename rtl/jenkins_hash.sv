// jenkins_hash: seeded 32-bit hash of a key of up to 96 bits.
//
// The perfect hash function needs two ordinary hash functions f1 and f2 that
// differ only in their seed; Bob Jenkins' hash is the one used by the
// published design. This unit computes the lookup3 "hashword" algorithm for a
// key of three or fewer 32-bit words: the three state words start at
// 0xdeadbeef + 4*NWORDS + seed, the key words are added in, and the lookup3
// final mix (seven xor/subtract/rotate steps) produces the result in c.
// Key bits above KEY_W are zero; NWORDS = ceil(KEY_W/32).
//
// Interface and timing: purely combinational, no clock. The caller reduces
// the 32-bit result to a table address.
module jenkins_hash #(
  parameter int unsigned KEY_W = 36   // 1..96
) (
  input  logic [KEY_W-1:0] key,
  input  logic [31:0]      seed,
  output logic [31:0]      hash
);
  localparam int unsigned NWORDS = (KEY_W + 31) / 32;

  function automatic logic [31:0] rot(input logic [31:0] x, input int unsigned k);
    return (x << k) | (x >> (32 - k));
  endfunction

  logic [95:0] kpad;
  logic [31:0] a, b, c;

  always_comb begin
    kpad = 96'(key);
    a = 32'hdeadbeef + 32'(NWORDS << 2) + seed;
    b = a;
    c = a;
    a = a + kpad[31:0];
    if (NWORDS > 1) b = b + kpad[63:32];
    if (NWORDS > 2) c = c + kpad[95:64];
    // lookup3 final()
    c = c ^ b; c = c - rot(b, 14);
    a = a ^ c; a = a - rot(c, 11);
    b = b ^ a; b = b - rot(a, 25);
    c = c ^ b; c = c - rot(b, 16);
    a = a ^ c; a = a - rot(c, 4);
    b = b ^ a; b = b - rot(a, 14);
    c = c ^ b; c = c - rot(b, 24);
    hash = c;
  end

endmodule
