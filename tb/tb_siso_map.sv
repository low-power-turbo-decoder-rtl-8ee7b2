// tb_siso_map: one half-iteration of each kind through the sliding-window
// MAP decoder (K = 1024, L = 32) with behavioural frame memories, extrinsic
// memory and interleaver table. The reference is computed in the testbench
// from the same algorithm description: alpha over the whole frame from the
// zero state, beta per window from equal metrics one window ahead (equal
// metrics at the frame end), LLR by two max* trees, Le = LLR - La - ys.
// Every output (index, LLR, Le) must match exactly and appear once; for a
// noise-free codeword the hard decisions must equal the message. The
// half-iteration must take (NW+3) stages.
module tb_siso_map;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  localparam int K = 1024, L = 32, NW = K / L;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic        go, half2, zero_la, half_done, busy, rd_en, out_valid, norm_evt;
  logic [9:0]  il_addr, il_data, sys_raddr, par_raddr, ext_raddr, out_idx;
  chan_t       sys_rdata;
  logic [11:0] par_rdata;
  le_t         ext_rdata, out_le;
  llr_t        out_llr;

  chan_t sys [K];
  logic [11:0] par [K];
  le_t   ext [K];
  int    pi [];
  bit    msg [K];
  int    rllr [K], rle [K];
  bit    got [K];
  int checks = 0, failures = 0, nout = 0, nerr_bits = 0;

  siso_map #(.K(K), .L(L)) dut (.clk, .rst_n, .go, .half2, .zero_la, .half_done, .busy,
    .il_addr, .il_data, .rd_en, .sys_raddr, .sys_rdata, .par_raddr, .par_rdata,
    .ext_raddr, .ext_rdata, .out_valid, .out_idx, .out_llr, .out_le, .norm_evt);

  always @(posedge clk) begin
    il_data <= 10'(pi[il_addr]);
    if (rd_en) begin
      sys_rdata <= sys[sys_raddr];
      par_rdata <= par[par_raddr];
      ext_rdata <= ext[ext_raddr];
    end
  end

  always @(posedge clk) if (out_valid) begin
    int k;
    k = int'(out_idx);
    checks++;
    if (got[k] || int'(out_llr) != rllr[k] || int'(out_le) != rle[k]) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d llr %0d exp %0d le %0d exp %0d dup %0d", k, out_llr, rllr[k], out_le, rle[k], got[k]);
    end
    if ((out_llr > 0) != msg[half2 ? pi[k] : k]) nerr_bits++;
    got[k] = 1;
    nout++;
  end

  // reference half-iteration
  task automatic reference(input bit h2, input bit z);
    int la [K], y [K], p [K];
    int a [K + 1][8];
    int b [8], nx [8], cur [8];
    for (int k = 0; k < K; k++) begin
      int src;
      src   = h2 ? pi[k] : k;
      y[k]  = int'(sys[src]);
      la[k] = z ? 0 : int'(ext[src]);
      p[k]  = h2 ? int'(chan_t'(par[k][5:0])) : int'(chan_t'(par[k][11:6]));
    end
    for (int s = 0; s < 8; s++) a[0][s] = (s == 0) ? 0 : -256;
    for (int k = 0; k < K; k++) begin
      cur = a[k];
      sm_step(0, cur, la[k], y[k], p[k], nx);
      a[k + 1] = nx;
    end
    for (int w = 0; w < NW; w++) begin
      for (int s = 0; s < 8; s++) b[s] = 0;
      if (w + 1 < NW)
        for (int k = (w + 2) * L - 1; k >= (w + 1) * L; k--) begin
          sm_step(1, b, la[k], y[k], p[k], nx); b = nx;
        end
      for (int k = (w + 1) * L - 1; k >= w * L; k--) begin
        int t [2][8];
        int l [2];
        logic [3:0] r;
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            r = rsc_step(3'(s), 1'(u));
            t[u][s] = a[k][s] + bm_ref(la[k], y[k], p[k], u, r[0]) + b[r[3:1]];
          end
        for (int u = 0; u < 2; u++)
          l[u] = ms_int(ms_int(ms_int(t[u][0], t[u][1]), ms_int(t[u][2], t[u][3])),
                        ms_int(ms_int(t[u][4], t[u][5]), ms_int(t[u][6], t[u][7])));
        rllr[k] = clip_int(l[1] - l[0], 12);
        rle[k]  = clip_int(rllr[k] - la[k] - y[k], 8);
        sm_step(1, b, la[k], y[k], p[k], nx); b = nx;
      end
    end
  endtask

  task automatic run(input bit h2, input bit z, input bit clean);
    int t;
    reference(h2, z);
    foreach (got[k]) got[k] = 0;
    nout = 0; nerr_bits = 0;
    @(negedge clk); go = 1; half2 = h2; zero_la = z;
    @(negedge clk); go = 0;
    t = 1;
    while (!half_done) begin @(negedge clk); t++; end
    checks += 2;
    if (nout != K) begin failures++; $display("FAIL %0d outputs", nout); end
    if (t < (NW + 3) * (L + 2) || t > (NW + 3) * (L + 8)) begin failures++; $display("FAIL half took %0d cycles", t); end
    if (clean) begin
      checks++;
      if (nerr_bits != 0) begin failures++; $display("FAIL %0d wrong decisions", nerr_bits); end
    end
    $display("half2=%0d: %0d cycles", h2, t);
  endtask

  task automatic channel(input real amp, input real sigma);
    logic [2:0] s1, s2;
    logic [3:0] r;
    s1 = 0; s2 = 0;
    for (int k = 0; k < K; k++) msg[k] = $urandom & 1;
    for (int k = 0; k < K; k++) begin
      logic [5:0] q1, q2;
      r = rsc_step(s1, msg[k]);     s1 = r[3:1]; q1 = quant(amp * ((r[0] ? 1.0 : -1.0) + sigma * gauss()));
      r = rsc_step(s2, msg[pi[k]]); s2 = r[3:1]; q2 = quant(amp * ((r[0] ? 1.0 : -1.0) + sigma * gauss()));
      sys[k] = quant(amp * ((msg[k] ? 1.0 : -1.0) + sigma * gauss()));
      par[k] = {q1, q2};
    end
  endtask

  initial begin
    interleaver(K, pi);
    go = 0; half2 = 0; zero_la = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    channel(2.0, 0.0);
    run(0, 1, 1);
    for (int k = 0; k < K; k++) ext[k] = le_t'(int'($urandom_range(100)) - 50);
    channel(2.0, 0.0);
    run(1, 0, 0);
    channel(1.5, 1.0);
    for (int k = 0; k < K; k++) ext[k] = le_t'(int'($urandom_range(255)) - 128);
    run(0, 0, 0);
    run(1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
