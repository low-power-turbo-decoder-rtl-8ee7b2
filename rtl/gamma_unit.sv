// gamma_unit: branch metric calculation of one trellis step.
// BM(xs,xp) = 1/2 * [La*xs + Lc*ys*xs + Lc*yp*xp] with BPSK symbols +/-1.
// Only two values are computed, A = BM(+1,+1) and B = BM(+1,-1); the other
// two are their negations, BM(-1,-1) = -A and BM(-1,+1) = -B, and are formed
// where they are used (tdec_pkg::branch_metric). The channel values arrive
// already multiplied by the channel reliability Lc. The halving is an
// arithmetic shift (rounds toward minus infinity). Combinational.
module gamma_unit
  import tdec_pkg::*;
(
  input  sym_t sym,
  output gam_t gam
);
  logic signed [9:0] sa, sb;

  always_comb begin
    sa = 10'(sym.la) + 10'(sym.ys) + 10'(sym.yp);
    sb = 10'(sym.la) + 10'(sym.ys) - 10'(sym.yp);
    gam.a = bm_t'(sa >>> 1);
    gam.b = bm_t'(sb >>> 1);
  end
endmodule
