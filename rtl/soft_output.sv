// soft_output: soft-output (LLR) unit. For trellis step k it evaluates
//   LLR_k = max*_{u=1}(alpha_k(s') + gamma_k(s',u) + beta_{k+1}(s))
//         - max*_{u=0}(alpha_k(s') + gamma_k(s',u) + beta_{k+1}(s))
// over the eight transitions of each input value, with a three-level tree of
// max* operators per input value, and the extrinsic value Le = LLR - La - ys.
// Fully pipelined: one step per cycle, four register stages (sums, tree
// level 1, tree level 2, level 3 with the subtraction and saturation), so
// out_* follow in_* by four cycles. LLR is saturated to q(12,3), Le to q(8,3).
// The step offset travels with the data as a tag.
module soft_output
  import tdec_pkg::*;
#(
  parameter int unsigned TAGW = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  sm_t             in_alpha [NSTATE],
  input  sm_t             in_beta  [NSTATE],
  input  gam_t            in_gam,
  input  le_t             in_la,
  input  chan_t           in_ys,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output llr_t            out_llr,
  output le_t             out_le,
  output logic            busy
);
  localparam int unsigned TW = 14;   // tree width: 11+11+9 bit sums plus headroom
  typedef logic signed [TW-1:0] tw_t;

  logic            v1, v2, v3, v4;
  logic [TAGW-1:0] t1, t2, t3;
  logic signed [9:0] las1, las2, las3;   // La + ys travels with the data
  tw_t s1 [2][NSTATE];
  tw_t s2 [2][4];
  tw_t s3 [2][2];
  tw_t l1 [2][4];
  tw_t l2 [2][2];
  tw_t l3 [2];

  // stage 0 -> 1: branch sums
  always_ff @(posedge clk) begin
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < NSTATE; s++)
        s1[u][s] <= TW'(in_alpha[s])
                  + TW'(branch_metric(in_gam, 1'(u), trel_par(3'(s), 1'(u))))
                  + TW'(in_beta[trel_next(3'(s), 1'(u))]);
    t1   <= in_tag;
    las1 <= 10'(in_la) + 10'(in_ys);
  end

  // tree level 1
  for (genvar u = 0; u < 2; u++) begin : g_u
    for (genvar i = 0; i < 4; i++) begin : g_l1
      max_star #(.W(TW)) u_ms (.x(s1[u][2*i]), .y(s1[u][2*i+1]), .z(l1[u][i]));
    end
    for (genvar i = 0; i < 2; i++) begin : g_l2
      max_star #(.W(TW)) u_ms (.x(s2[u][2*i]), .y(s2[u][2*i+1]), .z(l2[u][i]));
    end
    max_star #(.W(TW)) u_ms3 (.x(s3[u][0]), .y(s3[u][1]), .z(l3[u]));
  end

  always_ff @(posedge clk) begin
    s2   <= l1;
    t2   <= t1;
    las2 <= las1;
    s3   <= l2;
    t3   <= t2;
    las3 <= las2;
  end

  // level 3 and output stage
  always_ff @(posedge clk) begin
    logic signed [15:0] llr_w, le_w;
    llr_w   = 16'(l3[1]) - 16'(l3[0]);
    llr_w   = sat(llr_w, LLRW);
    le_w    = llr_w - 16'(las3);
    out_llr <= llr_t'(llr_w);
    out_le  <= le_t'(sat(le_w, LEW));
    out_tag <= t3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3, v4} <= '0;
    else        {v1, v2, v3, v4} <= {in_valid, v1, v2, v3};
  end

  assign out_valid = v4;
  assign busy      = v1 | v2 | v3 | v4;
endmodule
