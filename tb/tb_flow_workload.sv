// tb_flow_workload: the iteration-count experiment of the decoder at its
// default size (K = 1024, at most 10 iterations), run on a small number of
// packets. It compares two ways of using the same decoder:
//   traditional: give-up off, a failed packet is resent and decoded from a
//                zero a-priori start;
//   proposed:    give-up on, a resent packet starts from the extrinsic values
//                kept from the failed attempt (state reuse).
// For each channel SNR (Eb/N0 = 0.0, 0.2, 0.4, 0.6, 0.8 dB, code rate 1/3)
// NPKT random CRC-protected packets are encoded, and for each one up to
// NTX channel observations are drawn: the first at the nominal SNR, every
// resend 1 dB better. Both flows see exactly the same observations, so the
// comparison is paired. A packet is sent again until the decoder reports it
// valid; the iterations of all attempts are added up. Channel values are the
// channel LLRs Lc*y = (2/sigma^2)*y, quantised to the decoder's 6-bit input.
// A give-up on the first send of a packet that the traditional flow then
// decodes from the same observation is a false alarm; alarms and false alarms
// are counted per SNR.
// Checks: every packet is delivered by both flows with all bits right, the
// proposed flow gave up and reused state at least once, and at the lowest
// SNR it needed fewer iterations in total than the traditional flow. The
// table printed at the end lists the average iterations per valid packet.
module tb_flow_workload;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;

  localparam int K      = 1024;
  localparam int NPKT   = 32;
  localparam int NTX    = 4;
  localparam int NSNR   = 5;
  localparam real SNR_DB [NSNR] = '{0.0, 0.2, 0.4, 0.6, 0.8};

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
  int it_total [2][NSNR];     // [0] traditional, [1] proposed
  int tx_total [2][NSNR];
  int n_alarm [NSNR], n_false [NSNR];
  result_e f_trad, f_prop;     // result of the first send in each flow

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

  // deliver the current packet with one flow; returns iterations and sends
  task automatic deliver(input bit proposed, input int si, output result_e first);
    result_e r;
    int it, errs, t;
    giveup_en = proposed;
    t = 0;
    r = RES_NONE;
    while (t < NTX && r != RES_VALID) begin
      send(t, proposed && t > 0);
      wait_result(r, it);
      if (t == 0) first = r;
      it_total[proposed][si] += it;
      tx_total[proposed][si] += 1;
      t++;
    end
    check(r == RES_VALID, $sformatf("%s flow, %.1f dB: packet not delivered in %0d sends",
                                    proposed ? "proposed" : "traditional", SNR_DB[si], NTX));
    if (r == RES_VALID) begin
      bit_errors(errs);
      check(errs == 0, $sformatf("%s flow, %.1f dB: %0d bit errors in a valid packet",
                                 proposed ? "proposed" : "traditional", SNR_DB[si], errs));
    end
  endtask

  initial begin
    in_valid = 0; in_retx = 0; in_ys = 0; in_yp1 = 0; in_yp2 = 0;
    giveup_en = 0; dec_raddr = 0;
    interleaver(K, pi);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int si = 0; si < NSNR; si++) begin
      for (int p = 0; p < NPKT; p++) begin
        make_msg();
        for (int t = 0; t < NTX; t++) make_obs(t, SNR_DB[si] + ((t == 0) ? 0.0 : 1.0));
        deliver(0, si, f_trad);
        deliver(1, si, f_prop);
        if (f_prop == RES_GIVEUP) begin
          n_alarm[si]++;
          if (f_trad == RES_VALID) n_false[si]++;
        end
      end
    end

    $display("Eb/N0 dB | avg iterations per valid packet: traditional  proposed | sends: traditional  proposed | give-ups  false alarms");
    for (int si = 0; si < NSNR; si++)
      $display("  %.1f    |                                 %6.3f    %6.3f  |          %4d      %4d  |     %4d  %4d",
               SNR_DB[si], real'(it_total[0][si]) / NPKT, real'(it_total[1][si]) / NPKT,
               tx_total[0][si], tx_total[1][si], n_alarm[si], n_false[si]);
    $display("give-ups %0d, decodes with reused state %0d", n_giveup, n_reuse);

    check(n_giveup > 0, "the proposed flow never gave up");
    check(n_reuse > 0,  "no resend started from reused state");
    check(it_total[1][0] < it_total[0][0],
          $sformatf("at %.1f dB the proposed flow used %0d iterations, the traditional %0d",
                    SNR_DB[0], it_total[1][0], it_total[0][0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
