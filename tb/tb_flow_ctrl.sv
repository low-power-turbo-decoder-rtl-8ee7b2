// tb_flow_ctrl: drives the decoding-flow controller (K = 64, at most 4
// iterations) with a modelled MAP decoder, CRC result and give-up flag, and
// checks: packet loading, the half-iteration order, the CRC pass over all K
// addresses, the decision order (termination before give-up, then the
// iteration limit), the traditional flow with give-up disabled, and the
// reuse rule (a-priori forced to zero unless a retransmission follows a
// failed packet).
module tb_flow_ctrl;
  import tdec_pkg::*;
  localparam int K = 64, MAX_IT = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic       giveup_en, in_valid, in_retx, in_ready, load_we;
  logic [5:0] load_addr, crc_addr;
  logic       map_go, half2, zero_la, map_done, gu_clr, gu_give_up;
  logic       crc_clr, crc_rd, crc_in_valid, crc_zero;
  logic       res_valid, reuse_active, busy;
  result_e    res;
  logic [2:0] res_iters;
  int checks = 0, failures = 0;
  int it_seen = 0, halves = 0, crc_reads = 0;
  int pass_at = 0, gu_at = 0;     // iteration at which CRC passes / give-up flags
  bit first_zero_la;

  flow_ctrl #(.K(K), .MAX_IT(MAX_IT)) dut (.clk, .rst_n, .giveup_en,
    .in_valid, .in_retx, .in_ready, .load_we, .load_addr,
    .map_go, .half2, .zero_la, .map_done, .gu_clr, .gu_give_up,
    .crc_clr, .crc_rd, .crc_addr, .crc_in_valid, .crc_zero,
    .res_valid, .res, .res_iters, .reuse_active, .busy);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // MAP model
  always @(posedge clk) begin
    map_done <= 1'b0;
    if (map_go) begin
      chk(half2 == (halves % 2 == 1), "half order");
      if (!half2) begin
        it_seen++;
        if (it_seen == 1) first_zero_la = zero_la;
        else chk(!zero_la, "a-priori used after first half");
      end else chk(!zero_la, "a-priori in second half");
      halves++;
      fork begin
        repeat (5 + $urandom_range(10)) @(posedge clk);
        map_done <= 1'b1;
      end join_none
    end
    if (crc_rd) begin
      chk(int'(crc_addr) == crc_reads % K, "CRC address order");
      crc_reads++;
    end
  end
  assign crc_zero   = (pass_at != 0) && (it_seen >= pass_at);
  assign gu_give_up = (gu_at != 0) && (it_seen >= gu_at);

  task automatic packet(input bit retx, input int p_at, input int g_at, input bit gen,
                        input result_e exp_res, input int exp_it, input bit exp_zero);
    int addr;
    pass_at = p_at; gu_at = g_at; giveup_en = gen;
    it_seen = 0; halves = 0; crc_reads = 0; addr = 0;
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      in_valid = 1; in_retx = retx && (k == 0);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      chk(load_we && int'(load_addr) == k, "load address");
    end
    @(negedge clk); in_valid = 0; in_retx = 0;
    while (!res_valid) @(posedge clk);
    chk(res == exp_res, $sformatf("result %s exp %s", res.name(), exp_res.name()));
    chk(int'(res_iters) == exp_it, $sformatf("iterations %0d exp %0d", res_iters, exp_it));
    chk(first_zero_la == exp_zero, "reuse rule");
    chk(crc_reads == K * exp_it, $sformatf("CRC reads %0d", crc_reads));
    chk(halves == 2 * exp_it, "half-iterations");
  endtask

  initial begin
    giveup_en = 1; in_valid = 0; in_retx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    packet(0, 2, 0, 1, RES_VALID, 2, 1);        // CRC passes in iteration 2
    packet(1, 1, 0, 1, RES_VALID, 1, 1);        // resend flag after a valid packet: no reuse
    packet(0, 0, 3, 1, RES_GIVEUP, 3, 1);       // gives up in iteration 3
    packet(1, 1, 0, 1, RES_VALID, 1, 0);        // retransmission reuses the state
    packet(0, 2, 2, 1, RES_VALID, 2, 1);        // termination checked before give-up
    packet(0, 0, 1, 0, RES_MAXIT, MAX_IT, 1);   // traditional flow: runs to the limit
    packet(1, 0, 0, 1, RES_MAXIT, MAX_IT, 0);   // reuse after a max-iteration failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
