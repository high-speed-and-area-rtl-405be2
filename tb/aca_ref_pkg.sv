// aca_ref_pkg: reference models for the accuracy configurable adder tests.
//
// Both models work on plain integers, independently of the RTL structure.
// exact_add returns {cout, sum} of a + b + cin on n bits. approx_add returns
// what the adder gives in approximate mode: the n bits are cut into n/l
// segments of l bits; segment 0 adds with cin, and every higher segment
// adds with the generate bit a AND b of the top bit of the segment below
// instead of the real carry. Widths up to 62 bits.
package aca_ref_pkg;

  function automatic longint unsigned mask(int unsigned w);
    return (longint'(1) << w) - 1;
  endfunction

  function automatic longint unsigned exact_add(longint unsigned a, longint unsigned b,
                                                bit cin, int unsigned n);
    return ((a & mask(n)) + (b & mask(n)) + longint'(cin)) & mask(n + 1);
  endfunction

  function automatic longint unsigned approx_add(longint unsigned a, longint unsigned b,
                                                 bit cin, int unsigned n, int unsigned l);
    longint unsigned res = 0;
    longint unsigned c   = longint'(cin);
    for (int unsigned j = 0; j < n / l; j++) begin
      longint unsigned as = (a >> (j * l)) & mask(l);
      longint unsigned bs = (b >> (j * l)) & mask(l);
      longint unsigned t  = as + bs + c;
      res |= (t & mask(l)) << (j * l);
      if (j == n / l - 1) res |= (t >> l) << n;
      else c = (a >> (j * l + l - 1)) & (b >> (j * l + l - 1)) & 1;
    end
    return res;
  endfunction

  // True when some segment boundary bit propagates while a carry reaches
  // it, i.e. when approximate mode loses a carry. Computed from the exact
  // carries: the carry into bit i+1 differs from the generate bit g_i.
  function automatic bit mispredicts(longint unsigned a, longint unsigned b,
                                     bit cin, int unsigned n, int unsigned l);
    for (int unsigned j = 1; j < n / l; j++) begin
      int unsigned     i    = j * l - 1;
      longint unsigned low  = (a & mask(i + 1)) + (b & mask(i + 1)) + longint'(cin);
      bit              c_in = bit'((low >> (i + 1)) & 1);
      bit              g    = bit'((a >> i) & (b >> i) & 1);
      if (c_in != g) return 1'b1;
    end
    return 1'b0;
  endfunction

endpackage
