// Reference model of the compressed-sign 16-bit format, for the testbenches.
// Written bit by bit and with integer arithmetic, independently of the RTL:
//   ref_decode  builds the 32-bit word one bit at a time from the field;
//   ref_round   rounds a 32-bit value to the nearest word the format holds
//               (ties upward, +1.0 saturating to 0x7FFE0000) using division;
//   ref_mul     multiplies two Q1.31 values in 64 bits, truncating;
//   ref_sat32   clips a 64-bit sum to 32 bits.
package nf_ref_pkg;

  // Leading sign bits of a 32-bit value, 1..32
  function automatic int ref_lsc32(logic [31:0] x);
    int n = 1;
    while (n < 32 && x[31-n] == x[31]) n++;
    return n;
  endfunction

  // Sign-run length of a 15-bit field, 1..15
  function automatic int ref_k(logic [14:0] f);
    int k = 1;
    while (k < 15 && f[14-k] == f[14]) k++;
    return k;
  endfunction

  function automatic logic [31:0] ref_decode(logic [15:0] w);
    logic [31:0] q = '0;
    int pos = 31;
    int k   = ref_k(w[14:0]);
    int ns  = 2 * k - (w[15] ? 0 : 1);
    for (int i = 0; i < ns; i++) begin q[pos] = w[14]; pos--; end
    for (int i = 14 - k; i >= 0; i--) begin q[pos] = w[i]; pos--; end
    return q;
  endfunction

  // Value of a 32-bit word rounded onto the format's grid; sat set when a
  // positive value rounded up to +1.0.
  function automatic logic [31:0] ref_round(logic [31:0] x, output bit sat);
    longint v = longint'($signed(x));
    int n = ref_lsc32(x);
    int cap = x[31] ? 30 : 29;
    longint q, m, lo, hi, r;
    if (n > cap) n = cap;
    q  = longint'(1) << (32 - (n / 2 + 15));
    m  = v % q;
    if (m < 0) m += q;
    lo = v - m;
    hi = lo + q;
    r  = (v - lo < hi - v) ? lo : hi;
    sat = (r > 64'sh7FFF_FFFF);
    if (sat) r = 64'sh7FFE_0000;
    return r[31:0];
  endfunction

  function automatic logic [31:0] ref_sat32(longint s);
    if (s > 64'sh7FFF_FFFF) return 32'h7FFF_FFFF;
    if (s < -64'sh8000_0000) return 32'h8000_0000;
    return s[31:0];
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    longint p = longint'($signed(a)) * longint'($signed(b));
    return ref_sat32(p >>> 31);
  endfunction

endpackage
