// psec_ref_pkg: reference models for the testbenches.
//
// Written independently of the RTL: GF(2^m) products are formed as a
// carry-less product followed by polynomial reduction, the AMD function is
// evaluated term by term from explicit powers of x (not by Horner's rule),
// and CRC-32 is computed as the remainder of INIT*x^n + data*x^32 divided
// by the generator.
package psec_ref_pkg;

  function automatic int unsigned gf_mul_ref(int unsigned a, int unsigned b,
                                             int unsigned m, int unsigned poly);
    longint unsigned p;
    p = 0;
    for (int i = 0; i < int'(m); i++) if (b[i]) p = p ^ (longint'(a) << i);
    for (int i = 2 * int'(m) - 2; i >= int'(m); i--)
      if (p[i]) p = p ^ (longint'(poly) << (i - int'(m)));
    return int'(p);
  endfunction

  function automatic int unsigned sym_ref(logic [255:0] y, int unsigned i, int unsigned m);
    int unsigned v;
    v = 0;
    for (int k = 0; k < int'(m); k++) v[k] = y[(i - 1) * m + k];
    return v;
  endfunction

  // f(y,x) = sum_{i=1..b} y_i x^i + x^D, D = b+2 (b even) or b+3 (b odd)
  function automatic int unsigned amd_f_ref(logic [255:0] y, int unsigned m, int unsigned b,
                                            int unsigned x, int unsigned poly);
    int unsigned d, acc, xp;
    d   = (b % 2 == 0) ? b + 2 : b + 3;
    acc = 0;
    xp  = 1;
    for (int unsigned i = 1; i <= d; i++) begin
      xp = gf_mul_ref(xp, x, m, poly);
      if (i <= b) acc = acc ^ gf_mul_ref(sym_ref(y, i, m), xp, m, poly);
      if (i == d) acc = acc ^ xp;
    end
    return acc;
  endfunction

  function automatic int unsigned amd_pi_ref(logic [255:0] y, int unsigned m, int unsigned b,
                                             int unsigned x);
    int unsigned p;
    p = x;
    for (int unsigned i = 1; i <= b; i++) p = p ^ sym_ref(y, i, m);
    return p;
  endfunction

  // is (y, pi, f) a valid AMD codeword?
  function automatic bit amd_valid_ref(logic [255:0] y, int unsigned pi, int unsigned f,
                                       int unsigned m, int unsigned b, int unsigned poly);
    int unsigned x;
    x = pi;
    for (int unsigned i = 1; i <= b; i++) x = x ^ sym_ref(y, i, m);
    return amd_f_ref(y, m, b, x, poly) == f;
  endfunction

  // remainder of INIT*x^n + data*x^32 modulo the generator, by long division
  function automatic logic [31:0] crc_ref(logic [255:0] d, int n);
    logic [32:0]  rem;
    logic [287:0] v;
    v = '0;
    for (int i = 0; i < 32; i++) v[n + i] = 1'b1;          // INIT = all ones
    for (int i = 0; i < n; i++)  v[32 + i] = v[32 + i] ^ d[i];
    rem = '0;
    for (int i = n + 31; i >= 0; i--) begin
      rem = {rem[31:0], v[i]};
      if (rem[32]) rem = rem ^ 33'h1_04C1_1DB7;
    end
    return rem[31:0];
  endfunction

  // header {src, dst, enc, type, sig}
  function automatic logic [22:0] hdr_ref(int unsigned src, int unsigned dst, int unsigned enc,
                                          int unsigned ptype, int unsigned sig);
    return {src[5:0], dst[5:0], enc[1:0], ptype[1:0], sig[6:0]};
  endfunction

endpackage
