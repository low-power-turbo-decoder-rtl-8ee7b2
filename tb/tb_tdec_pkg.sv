// tb_tdec_pkg: reference models shared by the testbenches: 3GPP RSC encoder
// step, 3GPP internal interleaver, CRC-16 parity, Gaussian noise and channel
// value quantisation, and a floating-point max*.
// These are written independently of the RTL (direct bit formulas and real
// arithmetic) so that the testbenches compare the RTL against them.
package tb_tdec_pkg;

  // RSC step: state {s1,s2,s3} (s1 = MSB), returns {next_state, parity}
  function automatic logic [3:0] rsc_step(input logic [2:0] st, input logic u);
    logic s1, s2, s3, w;
    s1 = st[2]; s2 = st[1]; s3 = st[0];
    w  = u ^ s2 ^ s3;                 // 1 + D^2 + D^3 feedback
    return {w, s1, s2, w ^ s1 ^ s3};  // 1 + D + D^3 parity
  endfunction

  function automatic bit tb_is_prime(input int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  // 3GPP TS 25.212 turbo code internal interleaver; pi[k] = input index of
  // the k-th output bit. Built as explicit row-permuted matrix, then read out.
  function automatic void interleaver(input int K, ref int pi []);
    int R, C, p, v, n, x;
    int s [];
    int q [];
    int r [];
    int T [];
    int U [][];
    int mat [][];
    pi = new[K];
    R = (K <= 159) ? 5 : ((K <= 200 || (K >= 481 && K <= 530)) ? 10 : 20);
    if (K >= 481 && K <= 530) begin p = 53; C = 53; end
    else begin
      p = 7;
      while (!(tb_is_prime(p) && K <= R * (p + 1))) p++;
      C = (K <= R * (p - 1)) ? p - 1 : ((K <= R * p) ? p : p + 1);
    end
    // primitive root: order of v must be p-1
    for (v = 2; v < p; v++) begin
      int ord;
      x = v; ord = 1;
      while (x != 1) begin x = (x * v) % p; ord++; end
      if (ord == p - 1) break;
    end
    s = new[p - 1];
    s[0] = 1;
    for (int j = 1; j < p - 1; j++) s[j] = (v * s[j - 1]) % p;
    q = new[R];
    q[0] = 1;
    for (int i = 1; i < R; i++) begin
      int c, a, b, t;
      c = (q[i - 1] < 7) ? 7 : q[i - 1] + 1;
      forever begin
        a = c; b = p - 1;
        while (b != 0) begin t = a % b; a = b; b = t; end
        if (tb_is_prime(c) && a == 1) break;
        c++;
      end
      q[i] = c;
    end
    T = new[R];
    if (R == 5)       T = '{4, 3, 2, 1, 0};
    else if (R == 10) T = '{9, 8, 7, 6, 5, 4, 3, 2, 1, 0};
    else if ((K >= 2281 && K <= 2480) || (K >= 3161 && K <= 3210))
      T = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10};
    else
      T = '{19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 10, 8, 13, 17, 3, 1, 16, 6, 15, 11};
    r = new[R];
    for (int i = 0; i < R; i++) r[T[i]] = q[i];
    U = new[R];
    for (int i = 0; i < R; i++) begin
      U[i] = new[C];
      if (C == p) begin
        for (int j = 0; j < p - 1; j++) U[i][j] = s[(j * r[i]) % (p - 1)];
        U[i][p - 1] = 0;
      end else if (C == p + 1) begin
        for (int j = 0; j < p - 1; j++) U[i][j] = s[(j * r[i]) % (p - 1)];
        U[i][p - 1] = 0;
        U[i][p] = p;
      end else begin
        for (int j = 0; j < p - 1; j++) U[i][j] = s[(j * r[i]) % (p - 1)] - 1;
      end
    end
    if (C == p + 1 && K == R * C) begin
      x = U[R - 1][p]; U[R - 1][p] = U[R - 1][0]; U[R - 1][0] = x;
    end
    // matrix of input indices after intra- and inter-row permutation
    mat = new[R];
    for (int i = 0; i < R; i++) begin
      mat[i] = new[C];
      for (int j = 0; j < C; j++) mat[i][j] = T[i] * C + U[T[i]][j];
    end
    n = 0;
    for (int j = 0; j < C; j++)
      for (int i = 0; i < R; i++)
        if (mat[i][j] < K) begin pi[n] = mat[i][j]; n++; end
  endfunction

  // CRC-16 (D^16+D^12+D^5+1) remainder of a bit sequence, first bit first
  function automatic logic [15:0] crc16_ref(input bit bits [], input int n);
    logic [15:0] c;
    c = 0;
    for (int i = 0; i < n; i++) begin
      logic fb;
      fb = bits[i] ^ c[15];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // channel value Lc*y in q(6,3) with saturation
  function automatic logic signed [5:0] quant(input real v);
    int iv;
    iv = $rtoi(v * 8.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (iv > 31) iv = 31;
    if (iv < -32) iv = -32;
    return 6'(iv);
  endfunction

  function automatic real maxstar_real(input real a, input real b);
    real m, d;
    m = (a > b) ? a : b;
    d = (a > b) ? a - b : b - a;
    return m + $ln(1.0 + $exp(-d));
  endfunction


  // integer max* with the exact rounded Log-MAP correction, q(.,3)
  function automatic int ms_int(input int a, input int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + $rtoi($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  // branch metric of (u, parity) from La, ys, yp: 1/2 (La xs + ys xs + yp xp);
  // the xs = +1 values are floored, the xs = -1 values are their negations
  function automatic int bm_ref(input int la, input int ys, input int yp, input int u, input int p);
    int v;
    v = $rtoi($floor(real'(la + ys + (p == u ? yp : -yp)) / 2.0));
    return u ? v : -v;
  endfunction

  function automatic int clip_int(input int v, input int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1; lo = -(1 << (w - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  // one trellis step of all 8 state metrics, with the 512 subtraction and
  // 11-bit saturation; backward = 0: alpha_k -> alpha_k+1, 1: beta_k+1 -> beta_k
  function automatic void sm_step(input bit backward, input int cur [8], input int la,
                                  input int ys, input int yp, output int nxt [8]);
    int c [8][$];
    int raw [8];
    bit nrm;
    logic [3:0] r;
    for (int s = 0; s < 8; s++) c[s].delete();
    for (int sp = 0; sp < 8; sp++)
      for (int u = 0; u < 2; u++) begin
        r = rsc_step(3'(sp), 1'(u));
        if (!backward) c[r[3:1]].push_back(cur[sp] + bm_ref(la, ys, yp, u, r[0]));
        else           c[sp].push_back(cur[r[3:1]] + bm_ref(la, ys, yp, u, r[0]));
      end
    nrm = 0;
    for (int s = 0; s < 8; s++) begin
      raw[s] = ms_int(c[s][0], c[s][1]);
      if (raw[s] >= 512) nrm = 1;
    end
    for (int s = 0; s < 8; s++) nxt[s] = clip_int(raw[s] - (nrm ? 512 : 0), 11);
  endfunction

endpackage
