// tb_bp: runs a backward processor through INIT, LEARN and VALID passes
// against behavioural M1 and M2 banks. In the valid pass it checks every
// operand handed to the soft-output unit (offset, alpha from M2, beta_{k+1}
// from the reference backward recursion that continues the learning pass,
// La and ys), and the L+3-cycle pass time seen from the start pulse.
module tb_bp;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  localparam int L = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic       start, done, m1_re, m2_re, so_valid, norm_evt;
  logic [1:0] mode;
  logic [4:0] m1_raddr, m2_raddr, so_off;
  sym_t       m1_rdata;
  sm_t        m2_rdata [NSTATE];
  sm_t        so_alpha [NSTATE];
  sm_t        so_beta  [NSTATE];
  gam_t       so_gam;
  le_t        so_la;
  chan_t      so_ys;
  sym_t       win [L];
  sm_t        am  [L][NSTATE];
  int checks = 0, failures = 0, nout = 0;
  int beta [8];

  bp #(.L(L)) dut (.clk, .rst_n, .start, .mode, .done, .m1_re, .m1_raddr, .m1_rdata,
                   .m2_re, .m2_raddr, .m2_rdata, .so_valid, .so_off, .so_alpha, .so_beta,
                   .so_gam, .so_la, .so_ys, .norm_evt);

  always @(posedge clk) begin
    if (m1_re) m1_rdata <= win[m1_raddr];
    if (m2_re) m2_rdata <= am[m2_raddr];
  end

  task automatic fill();
    for (int i = 0; i < L; i++) begin
      win[i].ys = chan_t'(int'($urandom_range(63)) - 32);
      win[i].yp = chan_t'(int'($urandom_range(63)) - 32);
      win[i].la = le_t'(int'($urandom_range(160)) - 80);
      for (int s = 0; s < 8; s++) am[i][s] = sm_t'(int'($urandom_range(800)) - 400);
    end
  endtask

  task automatic pass(input logic [1:0] m);
    int t, nx [8];
    @(negedge clk); start = 1; mode = m;
    @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks++;
    if (t != ((m == 0) ? 1 : L + 3)) begin failures++; $display("FAIL mode %0d took %0d cycles", m, t); end
    // reference for learning: run the recursion over the window
    if (m == 1) begin
      for (int s = 0; s < 8; s++) beta[s] = 0;
      for (int i = L - 1; i >= 0; i--) begin
        sm_step(1, beta, int'(win[i].la), int'(win[i].ys), int'(win[i].yp), nx);
        beta = nx;
      end
    end
  endtask

  always @(posedge clk) if (so_valid) begin
    int k, nx [8];
    k = L - 1 - nout;
    checks++;
    if (so_off != 5'(k) || so_la != win[k].la || so_ys != win[k].ys) begin
      failures++; $display("FAIL step %0d: offset %0d", k, so_off);
    end
    for (int s = 0; s < 8; s++)
      if (so_alpha[s] != am[k][s] || int'(so_beta[s]) != beta[s]) begin
        failures++; $display("FAIL step %0d state %0d beta %0d exp %0d", k, s, so_beta[s], beta[s]);
      end
    sm_step(1, beta, int'(win[k].la), int'(win[k].ys), int'(win[k].yp), nx);
    beta = nx;
    nout++;
  end

  initial begin
    start = 0; mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      fill();
      pass(2'd1);                 // learn over the following window
      fill();
      nout = 0;
      pass(2'd2);                 // valid pass
      checks++;
      if (nout != L) begin failures++; $display("FAIL %0d outputs", nout); end
    end
    // INIT then VALID: starts from equal metrics
    for (int s = 0; s < 8; s++) beta[s] = 0;
    pass(2'd0);
    fill(); nout = 0;
    pass(2'd2);
    checks++;
    if (nout != L) begin failures++; $display("FAIL %0d outputs after INIT", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
