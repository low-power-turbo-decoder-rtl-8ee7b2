// interleaver_rom: the 3GPP turbo code internal interleaver as a look-up
// table, pi(k) for k = 0..K-1, with two synchronous read ports (one cycle).
// The table is a constant computed at elaboration from the frame size K by
// the 3GPP rule (TS 25.212): the K bits are written row by row into an R x C
// matrix (R = 5, 10 or 20 rows; C = p-1, p or p+1 columns for the prime p),
// every row is permuted by U_i(j) = s((j * r_i) mod (p-1)) with the
// primitive-root sequence s(j) = v^j mod p, the rows are permuted by the
// pattern T, and the matrix is read out column by column with the padding
// positions pruned. Port a serves the write processor, port b the extrinsic
// write-back path.
module interleaver_rom #(
  parameter int unsigned K = 1024,
  localparam int unsigned KW = $clog2(K)
) (
  input  logic          clk,
  input  logic [KW-1:0] addr_a,
  output logic [KW-1:0] data_a,
  input  logic [KW-1:0] addr_b,
  output logic [KW-1:0] data_b
);
  typedef logic [K-1:0][KW-1:0] table_t;

  function automatic bit is_prime(input int n);
    if (n < 2) return 1'b0;
    for (int d = 2; d * d <= n; d++)
      if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int gcd(input int a, input int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // smallest primitive root of the prime p
  function automatic int prim_root(input int p);
    for (int g = 2; g < p; g++) begin
      int  x;
      bit  ok;
      x  = 1;
      ok = 1'b1;
      for (int e = 1; e < p - 1; e++) begin
        x = (x * g) % p;
        if (x == 1) begin
          ok = 1'b0;
          break;
        end
      end
      if (ok) return g;
    end
    return 0;
  endfunction

  function automatic table_t build_table();
    table_t tab;
    int R, C, p, v, n;
    int s [257];
    int q [20];
    int r [20];
    int T [20];
    int tp5  [20] = '{4,3,2,1,0, 0,0,0,0,0, 0,0,0,0,0, 0,0,0,0,0};
    int tp10 [20] = '{9,8,7,6,5,4,3,2,1,0, 0,0,0,0,0, 0,0,0,0,0};
    int tpa  [20] = '{19,9,14,4,0,2,5,7,12,18,16,13,17,15,3,1,6,11,8,10};
    int tpb  [20] = '{19,9,14,4,0,2,5,7,12,18,10,8,13,17,3,1,16,6,15,11};
    for (int i = 0; i < K; i++) tab[i] = '0;
    // rows
    if (K <= 159)                                 R = 5;
    else if (K <= 200 || (K >= 481 && K <= 530)) R = 10;
    else                                          R = 20;
    // prime and columns
    if (K >= 481 && K <= 530) begin
      p = 53;
      C = p;
    end else begin
      p = 7;
      while (!(is_prime(p) && K <= R * (p + 1))) p++;
      if (K <= R * (p - 1))  C = p - 1;
      else if (K <= R * p)   C = p;
      else                   C = p + 1;
    end
    v = prim_root(p);
    // base sequence
    s[0] = 1;
    for (int j = 1; j <= p - 2; j++) s[j] = (v * s[j-1]) % p;
    // row primes
    q[0] = 1;
    for (int i = 1; i < R; i++) begin
      int c;
      c = q[i-1] + 1;
      if (c < 7) c = 7;
      while (!(is_prime(c) && gcd(c, p - 1) == 1)) c++;
      q[i] = c;
    end
    // inter-row pattern
    for (int i = 0; i < 20; i++) begin
      if (R == 5)       T[i] = tp5[i];
      else if (R == 10) T[i] = tp10[i];
      else if ((K >= 2281 && K <= 2480) || (K >= 3161 && K <= 3210)) T[i] = tpa[i];
      else              T[i] = tpb[i];
    end
    for (int i = 0; i < R; i++) r[T[i]] = q[i];
    // read out column by column
    n = 0;
    for (int j = 0; j < C; j++) begin
      for (int i = 0; i < R; i++) begin
        int row, u, jj, a;
        row = T[i];
        jj  = j;
        // special swap in the last row when the matrix is full (C = p+1)
        if (C == p + 1 && K == R * C && row == R - 1) begin
          if (j == 0)      jj = p;
          else if (j == p) jj = 0;
        end
        if (C == p - 1)          u = s[(jj * r[row]) % (p - 1)] - 1;
        else if (jj == p - 1)    u = 0;
        else if (jj == p)        u = p;
        else                     u = s[(jj * r[row]) % (p - 1)];
        a = row * C + u;
        if (a < K) begin
          tab[n] = KW'(a);
          n++;
        end
      end
    end
    return tab;
  endfunction

  localparam table_t PI = build_table();

  always_ff @(posedge clk) begin
    data_a <= PI[addr_a];
    data_b <= PI[addr_b];
  end
endmodule
