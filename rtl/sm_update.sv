// sm_update: one trellis step of the state metric recursion for all eight
// 3GPP states, eight ACSO cells working in parallel, followed by the metric
// normalisation. With BACKWARD = 0 it computes alpha_{k+1} from alpha_k
// (each state collects its two predecessors); with BACKWARD = 1 it computes
// beta_k from beta_{k+1} (each state collects its two successors).
// Normalisation subtracts 2^(SMW-2) from every metric as soon as any metric
// reaches 2^(SMW-2); max* is shift invariant, so the soft outputs are
// unchanged. The results are then saturated to SMW bits. Combinational;
// norm_evt flags a step in which the subtraction happened.
module sm_update
  import tdec_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  sm_t  cur [NSTATE],
  input  gam_t gam,
  output sm_t  nxt [NSTATE],
  output logic norm_evt
);
  localparam logic signed [12:0] NORM_TH = 13'sd1 <<< (SMW - 2);

  sm_t                m0 [NSTATE];
  sm_t                m1 [NSTATE];
  bm_t                g0 [NSTATE];
  bm_t                g1 [NSTATE];
  logic signed [12:0] raw [NSTATE];

  // Operand routing for each state.
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      if (BACKWARD) begin
        // successors of state s for input 0 and 1
        m0[s] = cur[trel_next(3'(s), 1'b0)];
        g0[s] = branch_metric(gam, 1'b0, trel_par(3'(s), 1'b0));
        m1[s] = cur[trel_next(3'(s), 1'b1)];
        g1[s] = branch_metric(gam, 1'b1, trel_par(3'(s), 1'b1));
      end else begin
        // predecessors of state s: {s[1:0], b}, b = 0 / 1
        logic [2:0] p0, p1;
        logic       u0, u1;
        p0 = {s[1:0], 1'b0};
        p1 = {s[1:0], 1'b1};
        u0 = s[2] ^ p0[1] ^ p0[0];
        u1 = s[2] ^ p1[1] ^ p1[0];
        m0[s] = cur[p0];
        g0[s] = branch_metric(gam, u0, trel_par(p0, u0));
        m1[s] = cur[p1];
        g1[s] = branch_metric(gam, u1, trel_par(p1, u1));
      end
    end
  end

  for (genvar s = 0; s < NSTATE; s++) begin : g_acso
    acso u_acso (.m0(m0[s]), .g0(g0[s]), .m1(m1[s]), .g1(g1[s]), .out(raw[s]));
  end

  always_comb begin
    norm_evt = 1'b0;
    for (int s = 0; s < NSTATE; s++)
      if (raw[s] >= NORM_TH) norm_evt = 1'b1;
    for (int s = 0; s < NSTATE; s++) begin
      logic signed [15:0] v;
      v = 16'(raw[s]) - (norm_evt ? 16'(NORM_TH) : 16'sd0);
      nxt[s] = sm_t'(sat(v, SMW));
    end
  end
endmodule
