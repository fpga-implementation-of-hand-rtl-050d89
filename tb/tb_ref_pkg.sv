// tb_ref_pkg: reference arithmetic for the testbenches, written apart from
// the RTL. Values are plain ints holding 9-bit two's-complement numbers with
// 7 fraction bits.
package tb_ref_pkg;
  function automatic int sat9(input longint x);
    if (x > 255)  return 255;
    if (x < -256) return -256;
    return int'(x);
  endfunction

  // floor(a*b / 128), saturated
  function automatic int mul9(input int a, input int b);
    longint p;
    longint q;
    p = longint'(a) * longint'(b);
    q = p / 128;
    if ((p % 128) != 0 && p < 0) q = q - 1;
    return sat9(q);
  endfunction

  // random value in [lo, hi]
  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // exp(-n/128) table entry, 0.16 format: 65535 * (65026/65536)^n, floored
  // at each step
  function automatic int exp_entry(input int n);
    longint e;
    e = 65535;
    for (int i = 0; i < n; i++) e = (e * 65026) / 65536;
    return int'(e);
  endfunction
endpackage
