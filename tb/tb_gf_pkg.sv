// tb_gf_pkg: plain (non-Montgomery) GF(2^m) reference arithmetic and a
// systematic Reed-Solomon encoder for the testbenches. Field elements are ints;
// p includes its x^m bit; alpha = x. Written independently of the RTL: plain
// shift-and-add multiplication, with Montgomery products formed as a plain
// product followed by m divisions by x.
package tb_gf_pkg;

  function automatic int gmul(int a, int b, int p, int m);
    int r = 0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (((r >> m) & 1) != 0) r = r ^ p;
      if (((b >> i) & 1) != 0) r = r ^ a;
    end
    return r;
  endfunction

  function automatic int apow(int e, int p, int m);   // alpha^e
    int r = 1;
    int q = (1 << m) - 1;
    int ee = ((e % q) + q) % q;
    for (int i = 0; i < ee; i++) begin
      r = r << 1;
      if (((r >> m) & 1) != 0) r = r ^ p;
    end
    return r;
  endfunction

  function automatic int ginv(int a, int p, int m);    // by search
    for (int x = 1; x < (1 << m); x++)
      if (gmul(a, x, p, m) == 1) return x;
    return 0;
  endfunction

  function automatic int mont(int a, int b, int p, int m);
    int r = gmul(a, b, p, m);
    for (int i = 0; i < m; i++) r = ((r & 1) != 0) ? ((r ^ p) >> 1) : (r >> 1);
    return r;
  endfunction

  // value of r(x) = sum r[j] x^j at x = alpha^e
  function automatic int peval(int r[256], int n, int e, int p, int m);
    int acc = 0;
    int a = apow(e, p, m);
    for (int j = n - 1; j >= 0; j--) acc = gmul(acc, a, p, m) ^ r[j];
    return acc;
  endfunction

  // systematic encoder, generator roots alpha^1..alpha^nk; c[j] is position j
  function automatic void encode(input int msg[256], input int n, input int nk,
                                 input int p, input int m, output int c[256]);
    int g[33];
    int rem[32];
    int fb;
    for (int j = 0; j < 33; j++) g[j] = 0;
    g[0] = 1;
    for (int i = 1; i <= nk; i++) begin
      int a = apow(i, p, m);
      for (int j = i; j >= 1; j--) g[j] = g[j - 1] ^ gmul(g[j], a, p, m);
      g[0] = gmul(g[0], a, p, m);
    end
    for (int j = 0; j < 32; j++) rem[j] = 0;
    for (int i = n - nk - 1; i >= 0; i--) begin
      fb = msg[i] ^ rem[nk - 1];
      for (int j = nk - 1; j >= 1; j--) rem[j] = rem[j - 1] ^ gmul(fb, g[j], p, m);
      rem[0] = gmul(fb, g[0], p, m);
    end
    for (int j = 0; j < 256; j++) c[j] = 0;
    for (int j = 0; j < nk; j++) c[j] = rem[j];
    for (int i = 0; i < n - nk; i++) c[nk + i] = msg[i];
  endfunction

endpackage
