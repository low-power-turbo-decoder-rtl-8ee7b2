// flow_ctrl: decoding-flow controller of the turbo decoder with early
// termination, early give-up and state reuse.
// LOAD:   accept the K channel symbols of a packet (in_valid/in_ready);
//         in_retx, sampled with the first symbol, marks a retransmission.
// HALF1/HALF2: one iteration = the MAP decoder run on code 1, then code 2.
// CRC:    termination check, the hard decisions are read in natural order
//         through the CRC-16 checker (K+2 cycles).
// DECIDE: CRC passes -> VALID. Otherwise, if give-up detection is enabled and
//         the give-up unit flagged this iteration -> GIVEUP. Otherwise, at the
//         maximum number of iterations -> MAXIT, else the next iteration.
//         Termination is checked before give-up. GIVEUP and MAXIT request a
//         retransmission.
// Reuse:  the extrinsic memory is left untouched after a failed packet. When
//         the next packet is a retransmission of it, its first half-iteration
//         takes those values as a-priori input; otherwise the a-priori input
//         of the first half-iteration is forced to zero.
// res_valid pulses for one cycle with the result and the iteration count.
module flow_ctrl
  import tdec_pkg::*;
#(
  parameter int unsigned K      = 1024,
  parameter int unsigned MAX_IT = 10,
  localparam int unsigned KW    = $clog2(K),
  localparam int unsigned ITW   = $clog2(MAX_IT + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           giveup_en,
  // packet input
  input  logic           in_valid,
  input  logic           in_retx,
  output logic           in_ready,
  output logic           load_we,
  output logic [KW-1:0]  load_addr,
  // MAP decoder
  output logic           map_go,
  output logic           half2,
  output logic           zero_la,
  input  logic           map_done,
  // give-up unit
  output logic           gu_clr,
  input  logic           gu_give_up,
  // CRC pass
  output logic           crc_clr,
  output logic           crc_rd,
  output logic [KW-1:0]  crc_addr,
  output logic           crc_in_valid,
  input  logic           crc_zero,
  // result
  output logic           res_valid,
  output result_e        res,
  output logic [ITW-1:0] res_iters,
  output logic           reuse_active,
  output logic           busy
);
  typedef enum logic [2:0] {S_LOAD, S_START, S_HALF1, S_HALF2, S_CRC, S_DECIDE} st_e;
  st_e            st;
  logic [KW:0]    cnt;
  logic [ITW-1:0] it;
  logic           retx_q;
  logic           last_failed;
  logic           go_q;
  logic           rd_q;

  assign in_ready  = (st == S_LOAD);
  assign load_we   = in_ready && in_valid;
  assign load_addr = cnt[KW-1:0];
  assign map_go    = go_q;
  assign crc_rd    = (st == S_CRC) && (cnt < (KW+1)'(K));
  assign crc_addr  = cnt[KW-1:0];
  assign crc_in_valid = rd_q;
  assign busy      = (st != S_LOAD);
  assign reuse_active = retx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_LOAD;
      cnt         <= '0;
      it          <= '0;
      retx_q      <= 1'b0;
      last_failed <= 1'b0;
      go_q        <= 1'b0;
      rd_q        <= 1'b0;
      half2       <= 1'b0;
      zero_la     <= 1'b1;
      gu_clr      <= 1'b0;
      crc_clr     <= 1'b0;
      res_valid   <= 1'b0;
      res         <= RES_NONE;
      res_iters   <= '0;
    end else begin
      go_q      <= 1'b0;
      gu_clr    <= 1'b0;
      crc_clr   <= 1'b0;
      res_valid <= 1'b0;
      rd_q      <= crc_rd;
      unique case (st)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) retx_q <= in_retx && last_failed;
          if (cnt == (KW+1)'(K - 1)) begin
            cnt    <= '0;
            st     <= S_START;
            gu_clr <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_START: begin
          it      <= ITW'(1);
          half2   <= 1'b0;
          zero_la <= !retx_q;
          go_q    <= 1'b1;
          st      <= S_HALF1;
        end
        S_HALF1: if (map_done) begin
          half2   <= 1'b1;
          zero_la <= 1'b0;
          go_q    <= 1'b1;
          st      <= S_HALF2;
        end
        S_HALF2: if (map_done) begin
          cnt     <= '0;
          crc_clr <= 1'b1;
          st      <= S_CRC;
        end
        S_CRC: begin
          if (crc_rd) cnt <= cnt + 1'b1;
          else if (!rd_q && !crc_clr) st <= S_DECIDE;
        end
        S_DECIDE: begin
          cnt <= '0;
          if (crc_zero) begin
            res <= RES_VALID;
            res_valid   <= 1'b1;
            res_iters   <= it;
            last_failed <= 1'b0;
            st          <= S_LOAD;
          end else if (giveup_en && gu_give_up) begin
            res <= RES_GIVEUP;
            res_valid   <= 1'b1;
            res_iters   <= it;
            last_failed <= 1'b1;
            st          <= S_LOAD;
          end else if (it == ITW'(MAX_IT)) begin
            res <= RES_MAXIT;
            res_valid   <= 1'b1;
            res_iters   <= it;
            last_failed <= 1'b1;
            st          <= S_LOAD;
          end else begin
            it      <= it + 1'b1;
            half2   <= 1'b0;
            go_q    <= 1'b1;
            st      <= S_HALF1;
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
