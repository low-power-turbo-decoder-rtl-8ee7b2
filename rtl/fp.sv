// fp: forward processor (FP) of the sliding-window Log-MAP decoder.
// On start it walks one window of L trellis steps in forward order: it reads
// the step's symbol from M1, forms the branch metrics (gamma_unit), stores the
// current alpha_k into M2 at the step's offset and updates its alpha register
// to alpha_{k+1} (sm_update, eight ACSO cells with normalisation). For the
// first window of a half-iteration (first = 1) the register starts from the
// all-zero encoder state: 0 for state 0 and a large negative value for the
// others. The alpha register carries across windows.
// Timing: start is a one-cycle pulse; the M1 read is registered, so done
// rises L+2 cycles after the clock edge that samples start and stays high
// until the next start.
module fp
  import tdec_pkg::*;
#(
  parameter int unsigned L = 32,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          first,
  output logic          done,
  // M1 read port
  output logic          m1_re,
  output logic [AW-1:0] m1_raddr,
  input  sym_t          m1_rdata,
  // M2 write port
  output logic          m2_we,
  output logic [AW-1:0] m2_waddr,
  output sm_t           m2_wdata [NSTATE],
  output logic          norm_evt
);
  localparam sm_t NEG = sm_t'(-(1 <<< (SMW - 3)));   // "minus infinity" start value

  logic          busy;
  logic [AW:0]   cnt;
  logic          vld;
  logic [AW-1:0] vaddr;
  sm_t           alpha [NSTATE];
  sm_t           alpha_nxt [NSTATE];
  gam_t          gam;
  logic          nevt;

  gamma_unit u_gam (.sym(m1_rdata), .gam(gam));
  sm_update #(.BACKWARD(1'b0)) u_upd (.cur(alpha), .gam(gam), .nxt(alpha_nxt), .norm_evt(nevt));

  assign m1_re    = busy && (cnt < (AW+1)'(L));
  assign m1_raddr = cnt[AW-1:0];
  assign m2_we    = vld;
  assign m2_waddr = vaddr;
  assign m2_wdata = alpha;
  assign norm_evt = vld && nevt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      vld   <= 1'b0;
      vaddr <= '0;
      done  <= 1'b0;
      for (int s = 0; s < NSTATE; s++) alpha[s] <= (s == 0) ? '0 : NEG;
    end else begin
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
        done <= 1'b0;
        vld  <= 1'b0;
        if (first)
          for (int s = 0; s < NSTATE; s++) alpha[s] <= (s == 0) ? '0 : NEG;
      end else if (busy) begin
        vld   <= m1_re;
        vaddr <= cnt[AW-1:0];
        if (m1_re) cnt <= cnt + 1'b1;
        if (vld) alpha <= alpha_nxt;
        if (!m1_re && !vld) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
