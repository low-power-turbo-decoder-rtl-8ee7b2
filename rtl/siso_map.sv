// siso_map: sliding-window Log-MAP soft-in/soft-out decoder, used for both
// constituent codes in turn. It holds the processing elements WP, FP, BP0,
// BP1, the soft-output unit, the window buffer M1 (4 banks) and the alpha
// memory M2 (2 banks), all sequenced by pe_controller in window periods of
// L steps (see pe_controller for the schedule).
// A go pulse runs one half-iteration over the K-bit frame: half2 = 0 decodes
// code 1 in natural order, half2 = 1 decodes code 2 in interleaved order.
// The frame memories and the interleaver ROM are outside; their read ports
// have one cycle latency. Soft outputs leave through out_* with the trellis
// index k (position in the order of the current code), window by window, each
// window from its last step to its first. half_done pulses once the last
// output has left. A half-iteration takes (NW+3) stages of about L+4 cycles.
module siso_map
  import tdec_pkg::*;
#(
  parameter int unsigned K = 1024,
  parameter int unsigned L = 32,
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned NW = K / L,
  localparam int unsigned WW = $clog2(NW),
  localparam int unsigned PW = $clog2(NW + 3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic          half2,
  input  logic          zero_la,
  output logic          half_done,
  output logic          busy,
  // interleaver ROM port
  output logic [KW-1:0] il_addr,
  input  logic [KW-1:0] il_data,
  // frame memories
  output logic          rd_en,
  output logic [KW-1:0] sys_raddr,
  input  chan_t         sys_rdata,
  output logic [KW-1:0] par_raddr,
  input  logic [2*YW-1:0] par_rdata,
  output logic [KW-1:0] ext_raddr,
  input  le_t           ext_rdata,
  // soft outputs
  output logic          out_valid,
  output logic [KW-1:0] out_idx,
  output llr_t          out_llr,
  output le_t           out_le,
  // normalisation activity (any processor subtracted this cycle)
  output logic          norm_evt
);
  // controller
  logic          wp_start, fp_start, fp_first, wp_done, fp_done;
  logic [1:0]    bp_start, bp_done;
  logic [1:0]    bp_mode [2];
  logic [PW-1:0] wp_win, fp_win, so_win;
  logic [PW-1:0] bp_win [2];
  logic          so_busy;
  logic          valid_bp_q;     // which BP runs the valid pass this stage

  pe_controller #(.NW(NW)) u_ctrl (
    .clk, .rst_n, .go,
    .wp_done, .fp_done, .bp_done, .pipe_busy(so_busy),
    .wp_start, .fp_start, .fp_first, .bp_start, .bp_mode,
    .wp_win, .fp_win, .bp_win, .so_win,
    .val_bp(valid_bp_q), .half_done, .busy
  );

  // M1
  logic          m1_we;
  logic [1:0]    m1_wbank;
  logic [AW-1:0] m1_waddr;
  sym_t          m1_wdata;
  logic          m1_re    [3];
  logic [1:0]    m1_rbank [3];
  logic [AW-1:0] m1_raddr [3];
  sym_t          m1_rdata [3];

  m1_buffer #(.L(L)) u_m1 (
    .clk, .we(m1_we), .wbank(m1_wbank), .waddr(m1_waddr), .wdata(m1_wdata),
    .re(m1_re), .rbank(m1_rbank), .raddr(m1_raddr), .rdata(m1_rdata)
  );

  // M2
  logic          m2_we, m2_re;
  logic [AW-1:0] m2_waddr, m2_raddr;
  sm_t           m2_wdata [NSTATE];
  sm_t           m2_rdata [NSTATE];
  logic [PW-1:0] fp_win_q;
  logic [PW-1:0] bp_win_q [2];

  always_ff @(posedge clk) begin
    if (fp_start) fp_win_q <= fp_win;
    for (int b = 0; b < 2; b++) if (bp_start[b]) bp_win_q[b] <= bp_win[b];
  end

  // WP
  wp #(.K(K), .L(L)) u_wp (
    .clk, .rst_n, .start(wp_start), .win(WW'(wp_win)), .half2, .zero_la, .done(wp_done),
    .il_addr, .il_data, .rd_en, .sys_raddr, .sys_rdata, .par_raddr, .par_rdata,
    .ext_raddr, .ext_rdata,
    .m1_we, .m1_wbank, .m1_waddr, .m1_wdata
  );

  // FP: M1 read port 0
  logic fp_nevt;
  fp #(.L(L)) u_fp (
    .clk, .rst_n, .start(fp_start), .first(fp_first), .done(fp_done),
    .m1_re(m1_re[0]), .m1_raddr(m1_raddr[0]), .m1_rdata(m1_rdata[0]),
    .m2_we, .m2_waddr, .m2_wdata, .norm_evt(fp_nevt)
  );
  assign m1_rbank[0] = fp_win_q[1:0];

  // BP0 / BP1: port 1 for the learning BP, port 2 for the valid BP
  logic          b_m1_re    [2];
  logic [AW-1:0] b_m1_raddr [2];
  logic          b_m2_re    [2];
  logic [AW-1:0] b_m2_raddr [2];
  logic          b_so_valid [2];
  logic [AW-1:0] b_so_off   [2];
  sm_t           b_so_alpha [2][NSTATE];
  sm_t           b_so_beta  [2][NSTATE];
  gam_t          b_so_gam   [2];
  le_t           b_so_la    [2];
  chan_t         b_so_ys    [2];
  logic [1:0]    bp_nevt;

  for (genvar b = 0; b < 2; b++) begin : g_bp
    bp #(.L(L)) u_bp (
      .clk, .rst_n, .start(bp_start[b]), .mode(bp_mode[b]), .done(bp_done[b]),
      .m1_re(b_m1_re[b]), .m1_raddr(b_m1_raddr[b]),
      .m1_rdata(m1_rdata[(valid_bp_q == 1'(b)) ? 2 : 1]),
      .m2_re(b_m2_re[b]), .m2_raddr(b_m2_raddr[b]), .m2_rdata,
      .so_valid(b_so_valid[b]), .so_off(b_so_off[b]), .so_alpha(b_so_alpha[b]),
      .so_beta(b_so_beta[b]), .so_gam(b_so_gam[b]), .so_la(b_so_la[b]), .so_ys(b_so_ys[b]),
      .norm_evt(bp_nevt[b])
    );
  end

  // port 1: learning BP (the one not in the valid pass), port 2: valid BP
  always_comb begin
    m1_re[1]    = b_m1_re[~valid_bp_q];
    m1_raddr[1] = b_m1_raddr[~valid_bp_q];
    m1_rbank[1] = bp_win_q[~valid_bp_q][1:0];
    m1_re[2]    = b_m1_re[valid_bp_q];
    m1_raddr[2] = b_m1_raddr[valid_bp_q];
    m1_rbank[2] = bp_win_q[valid_bp_q][1:0];
    m2_re       = b_m2_re[valid_bp_q];
    m2_raddr    = b_m2_raddr[valid_bp_q];
  end

  m2_buffer #(.L(L)) u_m2 (
    .clk, .we(m2_we), .wbank(fp_win_q[0]), .waddr(m2_waddr), .wdata(m2_wdata),
    .re(m2_re), .rbank(bp_win_q[valid_bp_q][0]), .raddr(m2_raddr), .rdata(m2_rdata)
  );

  // soft-output unit, fed by the valid BP; tag = trellis index k
  logic [KW-1:0] so_tag;
  logic [PW-1:0] so_win_q;
  always_ff @(posedge clk) if (bp_start != 2'b00) so_win_q <= so_win;
  assign so_tag = KW'(so_win_q) * KW'(L) + KW'(b_so_off[valid_bp_q]);

  soft_output #(.TAGW(KW)) u_so (
    .clk, .rst_n,
    .in_valid(b_so_valid[valid_bp_q]), .in_tag(so_tag),
    .in_alpha(b_so_alpha[valid_bp_q]), .in_beta(b_so_beta[valid_bp_q]),
    .in_gam(b_so_gam[valid_bp_q]), .in_la(b_so_la[valid_bp_q]), .in_ys(b_so_ys[valid_bp_q]),
    .out_valid, .out_tag(out_idx), .out_llr, .out_le, .busy(so_busy)
  );

  assign norm_evt = fp_nevt | (|bp_nevt);
endmodule
