// wp: write processor (WP). For one window period it gathers the L trellis
// steps of window `win` into M1 bank win%4: the systematic value, the parity
// value of the current constituent code and the a-priori value. In the second
// half-iteration the systematic and a-priori values are fetched at the
// interleaved address pi(k) (the interleaver ROM is looked up first); in the
// first half-iteration at k itself. With zero_la = 1 the a-priori value is
// forced to 0 (first half-iteration of a fresh packet); a retransmitted packet
// reuses the stored extrinsic values instead.
// Timing: a three-stage pipeline (ROM, memory read, M1 write); done rises
// L+3 cycles after the clock edge that samples start and stays high until
// the next start. All external reads have one cycle latency. The systematic
// value is written to M1 straight from the frame-memory read data.
module wp
  import tdec_pkg::*;
#(
  parameter int unsigned K = 1024,
  parameter int unsigned L = 32,
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned NW = K / L,
  localparam int unsigned WW = $clog2(NW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WW-1:0] win,
  input  logic          half2,
  input  logic          zero_la,
  output logic          done,
  // interleaver ROM
  output logic [KW-1:0] il_addr,
  input  logic [KW-1:0] il_data,
  // systematic memory, parity memory ({yp1, yp2}), extrinsic memory
  output logic          rd_en,
  output logic [KW-1:0] sys_raddr,
  input  chan_t         sys_rdata,
  output logic [KW-1:0] par_raddr,
  input  logic [2*YW-1:0] par_rdata,
  output logic [KW-1:0] ext_raddr,
  input  le_t           ext_rdata,
  // M1 write port
  output logic          m1_we,
  output logic [1:0]    m1_wbank,
  output logic [AW-1:0] m1_waddr,
  output sym_t          m1_wdata
);
  logic          busy;
  logic [AW:0]   cnt;
  logic          v1, v2;
  logic [KW-1:0] idx1;
  logic [AW-1:0] off1, off2;
  logic [WW-1:0] win_q;
  logic          issue;
  logic [KW-1:0] src;

  assign issue   = busy && (cnt < (AW+1)'(L));
  assign il_addr = KW'(win_q) * KW'(L) + KW'(cnt[AW-1:0]);
  assign src     = half2 ? il_data : idx1;

  assign rd_en     = v1;
  assign sys_raddr = src;
  assign ext_raddr = src;
  assign par_raddr = idx1;

  assign m1_we    = v2;
  assign m1_wbank = win_q[1:0];
  assign m1_waddr = off2;
  always_comb begin
    m1_wdata.ys = sys_rdata;
    m1_wdata.yp = half2 ? chan_t'(par_rdata[YW-1:0]) : chan_t'(par_rdata[2*YW-1:YW]);
    m1_wdata.la = zero_la ? '0 : ext_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      v1    <= 1'b0;
      v2    <= 1'b0;
      idx1  <= '0;
      off1  <= '0;
      off2  <= '0;
      win_q <= '0;
      done  <= 1'b0;
    end else begin
      if (start) begin
        busy  <= 1'b1;
        cnt   <= '0;
        win_q <= win;
        done  <= 1'b0;
        v1    <= 1'b0;
        v2    <= 1'b0;
      end else if (busy) begin
        v1   <= issue;
        v2   <= v1;
        idx1 <= il_addr;
        off1 <= cnt[AW-1:0];
        off2 <= off1;
        if (issue) cnt <= cnt + 1'b1;
        if (!issue && !v1 && !v2) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
