// bp: backward processor (BP0 / BP1) of the sliding-window Log-MAP decoder.
// A BP works on a window in two passes. In the learning pass (mode LEARN) it
// starts from equal metrics for all states and runs the beta recursion
// backwards over the window that follows the one to be decoded, which gives
// a reliable starting beta. In the valid pass (mode VALID) it continues
// backwards over the window to be decoded; for every step it reads alpha_k
// from M2 and hands alpha_k, beta_{k+1}, the branch metrics and the step's
// a-priori and systematic values to the soft-output unit. Mode INIT only
// loads equal metrics (used for the last window, which has no successor).
// Both passes walk the window from offset L-1 down to 0.
// Timing: start is a one-cycle pulse; reads are registered, so done rises
// L+2 cycles after the clock edge that samples start and stays high until the
// next start (INIT: 1 cycle). The alpha, a-priori and systematic values go to
// the soft-output unit straight from the memory read data, without a register,
// so that they line up with the beta and gamma of the same step.
module bp
  import tdec_pkg::*;
#(
  parameter int unsigned L = 32,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    mode,      // 0 INIT, 1 LEARN, 2 VALID
  output logic          done,
  // M1 read port
  output logic          m1_re,
  output logic [AW-1:0] m1_raddr,
  input  sym_t          m1_rdata,
  // M2 read port
  output logic          m2_re,
  output logic [AW-1:0] m2_raddr,
  input  sm_t           m2_rdata [NSTATE],
  // to the soft-output unit
  output logic          so_valid,
  output logic [AW-1:0] so_off,
  output sm_t           so_alpha [NSTATE],
  output sm_t           so_beta  [NSTATE],
  output gam_t          so_gam,
  output le_t           so_la,
  output chan_t         so_ys,
  output logic          norm_evt
);
  localparam logic [1:0] M_INIT = 2'd0, M_VALID = 2'd2;   // any other mode value is LEARN

  logic          busy;
  logic          valid_pass;
  logic [AW:0]   cnt;
  logic          vld;
  logic [AW-1:0] voff;
  sm_t           beta [NSTATE];
  sm_t           beta_nxt [NSTATE];
  gam_t          gam;
  logic          nevt;

  gamma_unit u_gam (.sym(m1_rdata), .gam(gam));
  sm_update #(.BACKWARD(1'b1)) u_upd (.cur(beta), .gam(gam), .nxt(beta_nxt), .norm_evt(nevt));

  assign m1_re    = busy && (cnt < (AW+1)'(L));
  assign m1_raddr = AW'(L - 1) - cnt[AW-1:0];
  assign m2_re    = m1_re && valid_pass;
  assign m2_raddr = m1_raddr;

  assign so_valid = vld && valid_pass;
  assign so_off   = voff;
  assign so_alpha = m2_rdata;
  assign so_beta  = beta;
  assign so_gam   = gam;
  assign so_la    = m1_rdata.la;
  assign so_ys    = m1_rdata.ys;
  assign norm_evt = vld && nevt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      valid_pass <= 1'b0;
      cnt        <= '0;
      vld        <= 1'b0;
      voff       <= '0;
      done       <= 1'b0;
      for (int s = 0; s < NSTATE; s++) beta[s] <= '0;
    end else begin
      if (start) begin
        cnt  <= '0;
        vld  <= 1'b0;
        valid_pass <= (mode == M_VALID);
        if (mode != M_VALID)
          for (int s = 0; s < NSTATE; s++) beta[s] <= '0;
        busy <= (mode != M_INIT);
        done <= (mode == M_INIT);
      end else if (busy) begin
        vld  <= m1_re;
        voff <= m1_raddr;
        if (m1_re) cnt <= cnt + 1'b1;
        if (vld) beta <= beta_nxt;
        if (!m1_re && !vld) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
