// tb_sm_update: checks one forward and one backward trellis step of all
// eight states against a reference built from the RSC encoder equations
// (tb_tdec_pkg::rsc_step) and real-valued max*, including the subtraction
// of 512 when any metric reaches 512 and saturation to 11 bits.
module tb_sm_update;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  sm_t  cur [NSTATE];
  sm_t  nf [NSTATE];
  sm_t  nb [NSTATE];
  gam_t gam;
  logic ef, eb;
  int checks = 0, failures = 0, n_norm = 0;

  sm_update #(.BACKWARD(1'b0)) dut_f (.cur, .gam, .nxt(nf), .norm_evt(ef));
  sm_update #(.BACKWARD(1'b1)) dut_b (.cur, .gam, .nxt(nb), .norm_evt(eb));

  function automatic int ms(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + $rtoi($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  function automatic int bmv(int u, int p);
    int v;
    v = (u == p) ? int'(gam.a) : int'(gam.b);
    return (u == 1) ? v : -v;
  endfunction

  task automatic step();
    int fr [NSTATE], br [NSTATE];
    int cand [NSTATE][$];
    bit fnorm, bnorm;
    logic [3:0] r;
    for (int s = 0; s < NSTATE; s++) cand[s].delete();
    for (int sp = 0; sp < NSTATE; sp++)
      for (int u = 0; u < 2; u++) begin
        r = rsc_step(3'(sp), 1'(u));
        cand[r[3:1]].push_back(int'(cur[sp]) + bmv(u, r[0]));
      end
    for (int s = 0; s < NSTATE; s++) fr[s] = ms(cand[s][0], cand[s][1]);
    for (int s = 0; s < NSTATE; s++) begin
      logic [3:0] r0, r1;
      r0 = rsc_step(3'(s), 1'b0); r1 = rsc_step(3'(s), 1'b1);
      br[s] = ms(int'(cur[r0[3:1]]) + bmv(0, r0[0]), int'(cur[r1[3:1]]) + bmv(1, r1[0]));
    end
    fnorm = 0; bnorm = 0;
    for (int s = 0; s < NSTATE; s++) begin
      if (fr[s] >= 512) fnorm = 1;
      if (br[s] >= 512) bnorm = 1;
    end
    if (fnorm) n_norm++;
    #1;
    checks += 2;
    if (ef !== fnorm) begin failures++; $display("FAIL fwd norm flag"); end
    if (eb !== bnorm) begin failures++; $display("FAIL bwd norm flag"); end
    for (int s = 0; s < NSTATE; s++) begin
      int ef_v, eb_v;
      ef_v = fr[s] - (fnorm ? 512 : 0); eb_v = br[s] - (bnorm ? 512 : 0);
      if (ef_v > 1023) ef_v = 1023; if (ef_v < -1024) ef_v = -1024;
      if (eb_v > 1023) eb_v = 1023; if (eb_v < -1024) eb_v = -1024;
      checks += 2;
      if (int'(nf[s]) != ef_v) begin failures++; $display("FAIL fwd s%0d %0d exp %0d", s, nf[s], ef_v); end
      if (int'(nb[s]) != eb_v) begin failures++; $display("FAIL bwd s%0d %0d exp %0d", s, nb[s], eb_v); end
    end
  endtask

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int base;
      base = (i % 3 == 0) ? 450 : int'($urandom_range(600)) - 300;
      for (int s = 0; s < NSTATE; s++) cur[s] = sm_t'(base + int'($urandom_range(120)) - 60);
      gam.a = bm_t'(int'($urandom_range(200)) - 100);
      gam.b = bm_t'(int'($urandom_range(200)) - 100);
      step();
    end
    checks++;
    if (n_norm == 0) begin failures++; $display("FAIL normalisation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
