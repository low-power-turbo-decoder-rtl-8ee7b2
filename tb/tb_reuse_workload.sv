// tb_reuse_workload: the state-reuse experiment of the decoder at its default
// size (K = 1024, at most 10 iterations), on a small number of packets.
// Packets are sent at a poor channel SNR (Eb/N0 0.0 dB, then 0.5 dB) with
// early give-up on, until NGU of them have been given up. For every given-up
// packet one resend is drawn at the same SNR plus an offset (0.0, 0.5 and
// 1.0 dB) and decoded twice with give-up off: first with the extrinsic values
// kept from the given-up attempt as a-priori start (in_retx = 1, state
// reuse), then from a zero start (in_retx = 0). Only the iterations of the
// resends are counted. Channel values are the channel LLRs (2/sigma^2)*y,
// quantised to the decoder's 6-bit input.
// Checks: every reuse decode really started from the kept state, each valid
// resend has all bits right, and over the whole run the resends with reuse
// needed fewer iterations than the resends from zero. The table printed at
// the end lists the average resend iterations.
module tb_reuse_workload;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;

  localparam int K      = 1024;
  localparam int NGU    = 16;
  localparam int NTX    = 2;
  localparam int NSNR   = 2;
  localparam int NOFF   = 3;
  localparam real SNR_DB [NSNR] = '{0.0, 0.5};
  localparam real OFF_DB [NOFF] = '{0.0, 0.5, 1.0};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic        giveup_en;
  logic        in_valid, in_retx, in_ready;
  chan_t       in_ys, in_yp1, in_yp2;
  logic        res_valid, retx_req, busy, dec_rdata;
  result_e     res;
  logic [3:0]  res_iters;
  logic [9:0]  dec_raddr;
  logic        giveup_eval, norm_evt, reuse_active;

  turbo_decoder dut (
    .clk, .rst_n, .giveup_en,
    .in_valid, .in_retx, .in_ys, .in_yp1, .in_yp2, .in_ready,
    .res_valid, .res, .res_iters, .retx_req, .busy,
    .dec_raddr, .dec_rdata,
    .giveup_eval, .norm_evt, .reuse_active
  );

  int checks = 0, failures = 0;
  int n_giveup = 0, n_reuse = 0;
  int pi [];
  bit msg [];
  chan_t ys [NTX][K], yp1 [NTX][K], yp2 [NTX][K];
  int it_total [2][NSNR][NOFF];     // [0] zero start, [1] reuse
  int n_sent [NSNR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic make_msg();
    logic [15:0] c;
    msg = new[K];
    for (int i = 0; i < K - 16; i++) msg[i] = $urandom & 1;
    c = crc16_ref(msg, K - 16);
    for (int i = 0; i < 16; i++) msg[K - 16 + i] = c[15 - i];
  endtask

  // observation t of the current packet at Eb/N0 = snr dB
  task automatic make_obs(input int t, input real snr);
    logic [2:0] s1, s2;
    logic [3:0] r;
    real sigma, lc;
    sigma = $sqrt(3.0 / (2.0 * (10.0 ** (snr / 10.0))));
    lc    = 2.0 / (sigma * sigma);
    s1 = 0; s2 = 0;
    for (int k = 0; k < K; k++) begin
      real xs, xp1, xp2;
      r  = rsc_step(s1, msg[k]);      s1 = r[3:1]; xp1 = r[0] ? 1.0 : -1.0;
      r  = rsc_step(s2, msg[pi[k]]);  s2 = r[3:1]; xp2 = r[0] ? 1.0 : -1.0;
      xs = msg[k] ? 1.0 : -1.0;
      ys[t][k]  = quant(lc * (xs  + sigma * gauss()));
      yp1[t][k] = quant(lc * (xp1 + sigma * gauss()));
      yp2[t][k] = quant(lc * (xp2 + sigma * gauss()));
    end
  endtask

  task automatic send(input int t, input bit retx);
    for (int k = 0; k < K; k++) begin
      in_valid <= 1'b1;
      in_retx  <= retx && (k == 0);
      in_ys    <= ys[t][k];
      in_yp1   <= yp1[t][k];
      in_yp2   <= yp2[t][k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    in_retx  <= 1'b0;
  endtask

  task automatic wait_result(output result_e r, output int iters);
    bit saw_reuse;
    saw_reuse = 0;
    do begin
      @(posedge clk);
      if (reuse_active && busy) saw_reuse = 1;
    end while (!res_valid);
    r     = res;
    iters = int'(res_iters);
    if (saw_reuse) n_reuse++;
    if (r == RES_GIVEUP) n_giveup++;
  endtask

  task automatic bit_errors(output int errs);
    errs = 0;
    for (int k = 0; k < K; k++) begin
      dec_raddr <= 10'(k);
      @(posedge clk);
      @(negedge clk);
      if (dec_rdata !== msg[k]) errs++;
    end
  endtask

  // decode observation 1 (the resend) with give-up off; returns iterations
  task automatic resend(input bit reuse, input int si, input int oi);
    result_e r;
    int it, errs, nr;
    giveup_en = 1'b0;
    nr = n_reuse;
    send(1, reuse);
    wait_result(r, it);
    it_total[reuse][si][oi] += it;
    if (reuse) check(n_reuse == nr + 1, "resend did not start from the kept state");
    if (r == RES_VALID) begin
      bit_errors(errs);
      check(errs == 0, $sformatf("%.1f dB + %.1f dB: %0d bit errors in a valid resend",
                                 SNR_DB[si], OFF_DB[oi], errs));
    end
  endtask

  initial begin
    in_valid = 0; in_retx = 0; in_ys = 0; in_yp1 = 0; in_yp2 = 0;
    giveup_en = 0; dec_raddr = 0;
    interleaver(K, pi);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int si = 0; si < NSNR; si++)
      for (int oi = 0; oi < NOFF; oi++)
        for (int g = 0; g < NGU; ) begin
          result_e r;
          int it;
          make_msg();
          make_obs(0, SNR_DB[si]);
          make_obs(1, SNR_DB[si] + OFF_DB[oi]);
          giveup_en = 1'b1;
          send(0, 1'b0);
          wait_result(r, it);
          n_sent[si]++;
          if (r == RES_GIVEUP) begin
            resend(1'b1, si, oi);
            resend(1'b0, si, oi);
            g++;
          end
        end

    $display("given-up at | offset | avg resend iterations: zero start  reuse");
    for (int si = 0; si < NSNR; si++)
      for (int oi = 0; oi < NOFF; oi++)
        $display("  %.1f dB    | %.1f dB |                         %6.3f  %6.3f",
                 SNR_DB[si], OFF_DB[oi], real'(it_total[0][si][oi]) / NGU,
                 real'(it_total[1][si][oi]) / NGU);
    for (int si = 0; si < NSNR; si++)
      $display("packets sent at %.1f dB to collect %0d give-ups: %0d", SNR_DB[si], NOFF * NGU, n_sent[si]);

    begin
      int tz, tr;
      tz = 0; tr = 0;
      for (int si = 0; si < NSNR; si++)
        for (int oi = 0; oi < NOFF; oi++) begin
          tz += it_total[0][si][oi];
          tr += it_total[1][si][oi];
        end
      check(tr < tz, $sformatf("resends with reuse used %0d iterations, from zero %0d", tr, tz));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
