// tb_ref_pkg: reference functions for the testbenches, written independently
// of the RTL: Bob Jenkins' lookup3 hashword() for up to three 32-bit words,
// and prefix containment used by the reference classifier.
package tb_ref_pkg;

  function automatic int unsigned rot(input int unsigned x, input int k);
    return (x << k) | (x >> (32 - k));
  endfunction

  // lookup3 hashword(k, length, initval) for length <= 3
  function automatic int unsigned hashword(input int unsigned k0, input int unsigned k1,
                                           input int unsigned k2, input int length,
                                           input int unsigned initval);
    int unsigned a, b, c;
    a = 32'hdeadbeef + (int'(length) << 2) + initval;
    b = a;
    c = a;
    if (length >= 3) c += k2;
    if (length >= 2) b += k1;
    a += k0;
    c ^= b; c -= rot(b, 14);
    a ^= c; a -= rot(c, 11);
    b ^= a; b -= rot(a, 25);
    c ^= b; c -= rot(b, 16);
    a ^= c; a -= rot(c, 4);
    b ^= a; b -= rot(a, 14);
    c ^= b; c -= rot(b, 24);
    return c;
  endfunction

  // Does the prefix (pv, pl) of a w-bit field contain the value x?
  function automatic bit pfx_has(input longint unsigned pv, input int pl,
                                 input longint unsigned x, input int w);
    if (pl == 0) return 1;
    return (pv >> (w - pl)) == (x >> (w - pl));
  endfunction

  // Is prefix (qv, ql) an ancestor of, or equal to, prefix (pv, pl)?
  function automatic bit pfx_covers(input longint unsigned qv, input int ql,
                                    input longint unsigned pv, input int pl, input int w);
    if (ql > pl) return 0;
    return pfx_has(qv, ql, pv, w);
  endfunction

endpackage
