// turbo_decoder: 3GPP turbo decoder with early termination (CRC-16), early
// give-up and state reuse. Top level of the design.
// One sliding-window Log-MAP decoder (siso_map) serves both constituent codes
// in turn. Around it sit the frame memories for the channel values (systematic
// and the two parities), the extrinsic memory (natural order; also the reuse
// state kept across a retransmission), the hard-decision memory, the 3GPP
// interleaver ROM, the give-up detection unit, the CRC-16 checker and the
// decoding-flow controller.
// Extrinsic values of code 1 are written at index k, those of code 2 at
// pi(k) (de-interleaving on write); hard decisions are taken from the LLRs of
// code 2 and written at pi(k). Each memory write happens in place: a window's
// values are read (by WP) three window periods before they are rewritten.
// Interface: stream the K symbols of a packet in with in_valid/in_ready
// (in_retx with the first symbol marks a retransmission of the last failed
// packet); res_valid then pulses with the result, the iteration count and
// retx_req. The decoded bits can be read through dec_raddr/dec_rdata (one
// cycle latency) while the decoder waits for the next packet.
module turbo_decoder
  import tdec_pkg::*;
#(
  parameter int unsigned K      = 1024,
  parameter int unsigned L      = 32,
  parameter int unsigned MAX_IT = 10,
  localparam int unsigned KW    = $clog2(K),
  localparam int unsigned ITW   = $clog2(MAX_IT + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           giveup_en,
  // channel symbols (already scaled by Lc), q(6,3)
  input  logic           in_valid,
  input  logic           in_retx,
  input  chan_t          in_ys,
  input  chan_t          in_yp1,
  input  chan_t          in_yp2,
  output logic           in_ready,
  // result
  output logic           res_valid,
  output result_e        res,
  output logic [ITW-1:0] res_iters,
  output logic           retx_req,
  output logic           busy,
  // decoded bits
  input  logic [KW-1:0]  dec_raddr,
  output logic           dec_rdata,
  // activity (for power analysis and test)
  output logic           giveup_eval,
  output logic           norm_evt,
  output logic           reuse_active
);
  // flow control
  logic          load_we;
  logic [KW-1:0] load_addr;
  logic          map_go, half2, zero_la, map_done, map_busy;
  logic          gu_clr, gu_give_up;
  logic          crc_clr, crc_rd, crc_in_valid, crc_zero;
  logic [KW-1:0] crc_addr;

  flow_ctrl #(.K(K), .MAX_IT(MAX_IT)) u_flow (
    .clk, .rst_n, .giveup_en,
    .in_valid, .in_retx, .in_ready, .load_we, .load_addr,
    .map_go, .half2, .zero_la, .map_done,
    .gu_clr, .gu_give_up,
    .crc_clr, .crc_rd, .crc_addr, .crc_in_valid, .crc_zero,
    .res_valid, .res, .res_iters, .reuse_active, .busy
  );
  assign retx_req = res_valid && (res == RES_GIVEUP || res == RES_MAXIT);

  // MAP decoder
  logic [KW-1:0]   il_addr_a, il_data_a, il_addr_b, il_data_b;
  logic            rd_en;
  logic [KW-1:0]   sys_raddr, par_raddr, ext_raddr;
  chan_t           sys_rdata;
  logic [2*YW-1:0] par_rdata;
  le_t             ext_rdata;
  logic            out_valid;
  logic [KW-1:0]   out_idx;
  llr_t            out_llr;
  le_t             out_le;

  siso_map #(.K(K), .L(L)) u_map (
    .clk, .rst_n, .go(map_go), .half2, .zero_la, .half_done(map_done), .busy(map_busy),
    .il_addr(il_addr_a), .il_data(il_data_a),
    .rd_en, .sys_raddr, .sys_rdata, .par_raddr, .par_rdata, .ext_raddr, .ext_rdata,
    .out_valid, .out_idx, .out_llr, .out_le, .norm_evt
  );

  interleaver_rom #(.K(K)) u_il (
    .clk, .addr_a(il_addr_a), .data_a(il_data_a), .addr_b(il_addr_b), .data_b(il_data_b)
  );

  // frame memories
  dp_ram #(.W(YW), .DEPTH(K)) u_sys (
    .clk, .we(load_we), .waddr(load_addr), .wdata(in_ys),
    .re(rd_en), .raddr(sys_raddr), .rdata(sys_rdata)
  );
  dp_ram #(.W(2*YW), .DEPTH(K)) u_par (
    .clk, .we(load_we), .waddr(load_addr), .wdata({in_yp1, in_yp2}),
    .re(rd_en), .raddr(par_raddr), .rdata(par_rdata)
  );

  // write-back of extrinsic values and hard decisions (one stage for pi)
  logic          wb_valid;
  logic [KW-1:0] wb_idx;
  le_t           wb_le;
  logic          wb_bit;
  logic [KW-1:0] wb_addr;

  assign il_addr_b = out_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_valid <= 1'b0;
    else        wb_valid <= out_valid;
  end
  always_ff @(posedge clk) begin
    wb_idx <= out_idx;
    wb_le  <= out_le;
    wb_bit <= (out_llr > 0);
  end
  assign wb_addr = half2 ? il_data_b : wb_idx;

  dp_ram #(.W(LEW), .DEPTH(K)) u_ext (
    .clk, .we(wb_valid), .waddr(wb_addr), .wdata(wb_le),
    .re(rd_en), .raddr(ext_raddr), .rdata(ext_rdata)
  );

  logic          dec_rbit;
  dp_ram #(.W(1), .DEPTH(K)) u_dec (
    .clk, .we(wb_valid && half2), .waddr(wb_addr), .wdata(wb_bit),
    .re(1'b1), .raddr(crc_rd ? crc_addr : dec_raddr), .rdata(dec_rbit)
  );
  assign dec_rdata = dec_rbit;

  // termination check and give-up detection
  crc16 u_crc (
    .clk, .rst_n, .clr(crc_clr), .in_valid(crc_in_valid), .in_bit(dec_rbit),
    .crc(), .zero(crc_zero)
  );

  giveup_detector #(.KMAX(K)) u_gu (
    .clk, .rst_n, .en(giveup_en), .clr(gu_clr), .frame_size(($clog2(K + 1))'(K)),
    .le_valid(wb_valid && half2), .le(wb_le),
    .eval(giveup_eval), .give_up(gu_give_up), .sum_last(), .max_q()
  );
endmodule
