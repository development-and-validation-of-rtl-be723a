// rs_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL's bit-serial multiply: GF(2^m) multiplication through log and
// antilog tables, syndromes by the direct sum S_j = sum_k r_k * alpha^(j*k),
// and a systematic RS encoder (division by g(x) = prod_j (x + alpha^(ROOT0+j)))
// to produce valid codewords. Call ref_init(m, poly) once before use.
package rs_ref_pkg;

  int unsigned forder;
  int          exp_t[int];
  int          log_t[int];

  function automatic void ref_init(input int unsigned m, input int unsigned poly);
    int v;
    forder = (1 << m) - 1;
    exp_t.delete();
    log_t.delete();
    v = 1;
    for (int i = 0; i < int'(forder); i++) begin
      exp_t[i] = v;
      log_t[v] = i;
      v = v * 2;
      if (v >= (1 << m)) v = v ^ int'(poly);
    end
  endfunction

  function automatic int gmul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % int'(forder)];
  endfunction

  function automatic int apow(input int e);
    return exp_t[((e % int'(forder)) + int'(forder)) % int'(forder)];
  endfunction

  // r[k] is the coefficient of x^k
  function automatic int syndrome(input int r[], input int root_exp);
    int s;
    s = 0;
    for (int k = 0; k < r.size(); k++)
      if (r[k] != 0) s ^= apow(log_t[r[k]] + root_exp * k);
    return s;
  endfunction

  // Systematic encoding: c(x) = msg(x) * x^nsyn + (msg(x) * x^nsyn mod g(x)).
  // msg[i] is the coefficient of x^i of the message; returns c[0..n-1].
  function automatic void encode(input int msg[], input int nsyn, input int root0,
                                 output int cw[]);
    int g[];
    int rem[];
    int fb;
    int n;
    n = msg.size() + nsyn;
    g = new[nsyn + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 0; j < nsyn; j++) begin
      // g <- g * (x + a^(root0+j))
      for (int i = j + 1; i >= 0; i--) begin
        g[i] = (i > 0 ? g[i-1] : 0) ^ gmul(g[i], apow(root0 + j));
      end
    end
    rem = new[nsyn];
    foreach (rem[i]) rem[i] = 0;
    for (int i = msg.size() - 1; i >= 0; i--) begin
      fb = msg[i] ^ rem[nsyn-1];
      for (int k = nsyn - 1; k > 0; k--) rem[k] = rem[k-1] ^ gmul(fb, g[k]);
      rem[0] = gmul(fb, g[0]);
    end
    cw = new[n];
    for (int i = 0; i < nsyn; i++) cw[i] = rem[i];
    for (int i = 0; i < msg.size(); i++) cw[nsyn + i] = msg[i];
  endfunction

endpackage
