// tb_turbo_decoder: end-to-end test of the turbo decoder at its default size
// (K = 1024, L = 32, at most 10 iterations).
// The testbench builds CRC-protected packets, encodes them with a reference
// 3GPP turbo encoder (two RSC encoders, reference interleaver, no tail),
// adds Gaussian noise and streams the channel values in. Scenarios:
//   1. clean packet            -> VALID after one iteration, all bits right
//   2. noisy packet            -> VALID, all bits right
//   3. pure-noise packet, give-up on  -> GIVEUP before the iteration limit
//   4. the same, give-up off (traditional flow) -> MAXIT after 10 iterations
//   5. packet at a bad SNR, then its retransmission (in_retx) at a better SNR
//      -> the resend starts from the stored extrinsic values and is VALID
// It counts how often each mechanism happened (valid termination, give-up,
// max-iteration stop, retransmission request, state reuse, metric
// normalisation, multi-iteration decode) and counts a failure for any that
// never happened. It also checks the cycle count of one iteration against
// the schedule: 2 half-iterations of NW+3 stages, plus the CRC pass.
module tb_turbo_decoder;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;

  localparam int K      = 1024;
  localparam int L      = 32;
  localparam int MAX_IT = 10;

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
  int n_valid = 0, n_giveup = 0, n_maxit = 0, n_retx = 0, n_reuse = 0, n_norm = 0, n_multi = 0;
  int pi [];
  bit msg [];
  chan_t ys [K], yp1 [K], yp2 [K];
  result_e last_res;
  int      last_iters;
  longint  cyc = 0, t_start = 0, t_end = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (norm_evt) n_norm <= n_norm + 1;
    if (retx_req) n_retx <= n_retx + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // random message with CRC-16 in the last 16 bits
  task automatic make_msg();
    logic [15:0] c;
    msg = new[K];
    for (int i = 0; i < K - 16; i++) msg[i] = $urandom & 1;
    c = crc16_ref(msg, K - 16);
    for (int i = 0; i < 16; i++) msg[K - 16 + i] = c[15 - i];
  endtask

  // encode msg and make channel values amp*(x + sigma*n)
  task automatic make_channel(input real amp, input real sigma, input bit signal);
    logic [2:0] s1, s2;
    logic [3:0] r;
    s1 = 0; s2 = 0;
    for (int k = 0; k < K; k++) begin
      real xs, xp1, xp2;
      r  = rsc_step(s1, msg[k]);      s1 = r[3:1]; xp1 = r[0] ? 1.0 : -1.0;
      r  = rsc_step(s2, msg[pi[k]]);  s2 = r[3:1]; xp2 = r[0] ? 1.0 : -1.0;
      xs = msg[k] ? 1.0 : -1.0;
      if (!signal) begin xs = 0.0; xp1 = 0.0; xp2 = 0.0; end
      ys[k]  = quant(amp * (xs  + sigma * gauss()));
      yp1[k] = quant(amp * (xp1 + sigma * gauss()));
      yp2[k] = quant(amp * (xp2 + sigma * gauss()));
    end
  endtask

  task automatic send(input bit retx);
    for (int k = 0; k < K; k++) begin
      in_valid <= 1'b1;
      in_retx  <= retx && (k == 0);
      in_ys    <= ys[k];
      in_yp1   <= yp1[k];
      in_yp2   <= yp2[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    in_retx  <= 1'b0;
    t_start = cyc;
  endtask

  task automatic wait_result();
    bit saw_reuse;
    saw_reuse = 0;
    do begin
      @(posedge clk);
      if (reuse_active && busy) saw_reuse = 1;
    end while (!res_valid);
    t_end      = cyc;
    last_res   = res;
    last_iters = int'(res_iters);
    if (saw_reuse) n_reuse++;
    case (res)
      RES_VALID:  n_valid++;
      RES_GIVEUP: n_giveup++;
      RES_MAXIT:  n_maxit++;
      default: ;
    endcase
    if (res == RES_VALID && res_iters > 1) n_multi++;
    $display("result %s after %0d iterations, %0d cycles", res.name(), res_iters, t_end - t_start);
  endtask

  task automatic check_bits(input string what);
    int errs;
    errs = 0;
    for (int k = 0; k < K; k++) begin
      dec_raddr <= 10'(k);
      @(posedge clk);
      @(negedge clk);
      if (dec_rdata !== msg[k]) errs++;
    end
    check(errs == 0, $sformatf("%s: %0d bit errors", what, errs));
  endtask

  initial begin
    in_valid = 0; in_retx = 0; in_ys = 0; in_yp1 = 0; in_yp2 = 0;
    giveup_en = 1; dec_raddr = 0;
    interleaver(K, pi);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. clean packet
    make_msg();
    make_channel(2.0, 0.2, 1);
    send(0);
    wait_result();
    check(last_res == RES_VALID, "clean packet valid");
    check(last_iters == 1, "clean packet in one iteration");
    // one iteration: 2 x (NW+3) stages, each about L+4 cycles, plus K+4 for CRC
    check((t_end - t_start) > 2 * (K / L + 3) * (L + 2) + K &&
          (t_end - t_start) < 2 * (K / L + 3) * (L + 6) + K + 40,
          $sformatf("one-iteration latency %0d cycles", t_end - t_start));
    check_bits("clean packet");

    // 2. noisy packet
    make_msg();
    make_channel(1.5, 1.0, 1);
    send(0);
    wait_result();
    check(last_res == RES_VALID, "noisy packet valid");
    check_bits("noisy packet");

    // 3. pure noise, give-up enabled
    make_msg();
    make_channel(1.5, 1.0, 0);
    send(0);
    wait_result();
    check(last_res == RES_GIVEUP, "noise packet given up");
    check(last_iters < MAX_IT, "give-up before the limit");

    // 4. pure noise, traditional flow
    giveup_en = 0;
    send(0);
    wait_result();
    check(last_res == RES_MAXIT, "noise packet stops at the limit");
    check(last_iters == MAX_IT, "ten iterations");
    giveup_en = 1;

    // 5. bad-SNR packet, then its retransmission with reuse
    make_msg();
    make_channel(1.0, 1.25, 1);
    send(0);
    wait_result();
    check(last_res != RES_VALID, "bad-SNR packet fails");
    make_channel(1.5, 1.0, 1);
    send(1);
    wait_result();
    check(last_res == RES_VALID, "retransmission valid");
    check_bits("retransmission");

    check(n_valid > 0,  "mechanism: CRC termination");
    check(n_giveup > 0, "mechanism: early give-up");
    check(n_maxit > 0,  "mechanism: maximum-iteration stop");
    check(n_retx > 0,   "mechanism: retransmission request");
    check(n_reuse > 0,  "mechanism: state reuse");
    check(n_norm > 0,   "mechanism: metric normalisation");
    check(n_multi > 0,  "mechanism: multi-iteration decode");
    $display("counts: valid=%0d giveup=%0d maxit=%0d retx=%0d reuse=%0d norm=%0d multi=%0d",
             n_valid, n_giveup, n_maxit, n_retx, n_reuse, n_norm, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
