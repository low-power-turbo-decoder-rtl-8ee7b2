// pe_controller: stage sequencer and enable/done handshake of the
// processing elements (WP, FP, BP0, BP1) of the sliding-window MAP decoder.
// One half-iteration is NW+3 stages (window periods). In stage p:
//   WP  writes window p into M1 bank p%4                 (p < NW)
//   FP  computes alpha over window p-2, into M2 bank     (0 <= p-2 < NW)
//   BP(p-2)%2 learns over window p-1 (INIT if p-1 = NW)  (0 <= p-2 < NW)
//   BP(p-3)%2 computes valid beta and soft outputs of window p-3
// At the start of a stage every PE with work gets a one-cycle start pulse;
// the controller then waits until every started PE reports done (PEs take
// different times: WP needs L+2 cycles, the others L+1) and moves on to the
// next stage. After the last stage it waits until the soft-output pipeline
// is empty and pulses half_done.
module pe_controller #(
  parameter int unsigned NW = 32,
  localparam int unsigned PW = $clog2(NW + 3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic          wp_done,
  input  logic          fp_done,
  input  logic [1:0]    bp_done,
  input  logic          pipe_busy,
  output logic          wp_start,
  output logic          fp_start,
  output logic          fp_first,
  output logic [1:0]    bp_start,
  output logic [1:0]    bp_mode [2],     // 0 INIT, 1 LEARN, 2 VALID
  output logic [PW-1:0] wp_win,
  output logic [PW-1:0] fp_win,
  output logic [PW-1:0] bp_win [2],      // M1 window each BP reads
  output logic [PW-1:0] so_win,          // window whose soft outputs appear
  output logic          val_bp,          // BP running the valid pass
  output logic          half_done,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DRAIN} st_e;
  st_e           st;
  logic [PW-1:0] p;
  logic          en_wp, en_fp, en_lrn, en_val;
  logic          lrn_bp;
  logic          all_done;
  logic          wp_en_q, fp_en_q;
  logic [1:0]    bp_en_q;

  // work of stage p
  always_comb begin
    en_wp  = (p < PW'(NW));
    en_fp  = (p >= PW'(2)) && (p < PW'(NW + 2));
    en_lrn = en_fp;
    en_val = (p >= PW'(3));
    lrn_bp = p[0];          // (p-2)%2
    // the valid BP is (p-3)%2 = ~p[0]
  end

  assign wp_win   = p;
  assign fp_win   = p - PW'(2);
  assign fp_first = (p == PW'(2));
  assign so_win   = p - PW'(3);
  assign busy     = (st != S_IDLE);
  assign val_bp   = ~p[0];

  always_comb begin
    bp_mode[0] = 2'd0;
    bp_mode[1] = 2'd0;
    bp_win[0]  = '0;
    bp_win[1]  = '0;
    if (en_lrn) begin
      bp_mode[lrn_bp] = (p - PW'(1) < PW'(NW)) ? 2'd1 : 2'd0;
      bp_win[lrn_bp]  = p - PW'(1);
    end
    if (en_val) begin
      bp_mode[~p[0]] = 2'd2;
      bp_win[~p[0]]  = p - PW'(3);
    end
  end

  always_comb begin
    wp_start = (st == S_ISSUE) && en_wp;
    fp_start = (st == S_ISSUE) && en_fp;
    bp_start = '0;
    if (st == S_ISSUE) begin
      if (en_lrn) bp_start[lrn_bp] = 1'b1;
      if (en_val) bp_start[~p[0]] = 1'b1;
    end
  end

  assign all_done = (!wp_en_q || wp_done) && (!fp_en_q || fp_done) &&
                    (!bp_en_q[0] || bp_done[0]) && (!bp_en_q[1] || bp_done[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      p         <= '0;
      half_done <= 1'b0;
      wp_en_q   <= 1'b0;
      fp_en_q   <= 1'b0;
      bp_en_q   <= '0;
    end else begin
      half_done <= 1'b0;
      unique case (st)
        S_IDLE: if (go) begin
          p  <= '0;
          st <= S_ISSUE;
        end
        S_ISSUE: begin
          wp_en_q <= wp_start;
          fp_en_q <= fp_start;
          bp_en_q <= bp_start;
          st      <= S_WAIT;
        end
        S_WAIT: if (all_done) begin
          if (p == PW'(NW + 2)) st <= S_DRAIN;
          else begin
            p  <= p + 1'b1;
            st <= S_ISSUE;
          end
        end
        S_DRAIN: if (!pipe_busy) begin
          half_done <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
