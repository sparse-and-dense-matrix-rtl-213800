// tb_ref_pkg: reference arithmetic for the testbenches, written without
// reference to the RTL. A 32 bit word holds 4 x 8, 8 x 4 or 16 x 2 bit two's
// complement fields, field 0 in the low bits; precision code 0 = 8 bit,
// 1 = 4 bit, 2 = 2 bit, 3 behaves as 8 bit.
package tb_ref_pkg;

  function automatic int bits_of(int prec);
    return (prec == 1) ? 4 : (prec == 2) ? 2 : 8;
  endfunction

  // Signed value of field i of w.
  function automatic int field(bit [31:0] w, int bits, int i);
    longint v;
    v = longint'((w >> (bits * i)) & ((32'd1 << bits) - 1));
    if (v >= (longint'(1) << (bits - 1))) v -= (longint'(1) << bits);
    return int'(v);
  endfunction

  function automatic int ref_dot(int prec, bit [31:0] a, bit [31:0] b);
    int bits, n, s;
    bits = bits_of(prec);
    n = 32 / bits;
    s = 0;
    for (int i = 0; i < n; i++) s += field(a, bits, i) * field(b, bits, i);
    return s;
  endfunction

  // Random packed word; each field is zero with probability zero_pct %.
  function automatic bit [31:0] rand_word(int prec, int zero_pct);
    int bits;
    bit [31:0] w;
    bits = bits_of(prec);
    w = '0;
    for (int i = 0; i < 32 / bits; i++)
      if (int'($urandom % 100) >= zero_pct)
        w |= ($urandom & ((32'd1 << bits) - 1)) << (bits * i);
    return w;
  endfunction

endpackage
