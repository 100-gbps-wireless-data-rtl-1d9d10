// tb_rs_ref_pkg: reference Reed-Solomon model for the testbenches, written
// independently of the RTL: GF(2^8) via log/antilog tables built at run
// time, generator polynomials from their roots, systematic encoding by
// polynomial long division, and codeword checking by evaluating c(alpha^i).
// Field polynomial 0x11D, generator roots alpha^1 .. alpha^2t.
package tb_rs_ref_pkg;

  int unsigned exp_t [512];
  int unsigned log_t [256];
  bit          ready = 0;

  function automatic void init();
    int unsigned x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    for (int i = 255; i < 512; i++) exp_t[i] = exp_t[i - 255];
    ready = 1;
  endfunction

  function automatic byte unsigned mul(byte unsigned a, byte unsigned b);
    if (!ready) init();
    if (a == 0 || b == 0) return 0;
    return byte'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic byte unsigned apow(int e);
    if (!ready) init();
    return byte'(exp_t[e % 255]);
  endfunction

  // codeword[0] is sent first (coefficient of x^254)
  function automatic void encode(input int t, input byte unsigned msg [], output byte unsigned cw [255]);
    byte unsigned g [19];
    byte unsigned rem [];
    int nr = 2 * t;
    int k = 255 - nr;
    foreach (g[i]) g[i] = 0;
    g[0] = 1;                      // g[i] = coefficient of x^i
    for (int i = 1; i <= nr; i++) begin
      for (int j = nr; j > 0; j--) g[j] = g[j-1] ^ mul(g[j], apow(i));
      g[0] = mul(g[0], apow(i));
    end
    rem = new[nr];
    foreach (rem[i]) rem[i] = 0;   // rem[i] = coefficient of x^i
    for (int m = 0; m < k; m++) begin
      byte unsigned fb = msg[m] ^ rem[nr-1];
      for (int j = nr - 1; j > 0; j--) rem[j] = rem[j-1] ^ mul(fb, g[j]);
      rem[0] = mul(fb, g[0]);
    end
    for (int m = 0; m < k; m++) cw[m] = msg[m];
    for (int j = 0; j < nr; j++) cw[k + j] = rem[nr - 1 - j];
  endfunction

  // true when c(alpha^i) = 0 for i = 1..2t
  function automatic bit is_codeword(int t, byte unsigned cw [255]);
    for (int i = 1; i <= 2 * t; i++) begin
      byte unsigned s = 0;
      for (int m = 0; m < 255; m++) s = mul(s, apow(i)) ^ cw[m];
      if (s != 0) return 0;
    end
    return 1;
  endfunction

endpackage
