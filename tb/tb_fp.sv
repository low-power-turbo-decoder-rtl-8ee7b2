// tb_fp: runs the forward processor over three windows of random symbols
// (first window with first = 1) against a behavioural M1 bank, and checks
// every alpha vector written to M2 and its address against the reference
// recursion, plus the window time (L+3 cycles from start to done seen on the falling edge).
module tb_fp;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  localparam int L = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic       start, first, done, m1_re, m2_we, norm_evt;
  logic [4:0] m1_raddr, m2_waddr;
  sym_t       m1_rdata;
  sm_t        m2_wdata [NSTATE];
  sym_t       win [L];
  int checks = 0, failures = 0, nwr = 0;
  int alpha [8];

  fp #(.L(L)) dut (.clk, .rst_n, .start, .first, .done, .m1_re, .m1_raddr, .m1_rdata,
                   .m2_we, .m2_waddr, .m2_wdata, .norm_evt);

  always @(posedge clk) if (m1_re) m1_rdata <= win[m1_raddr];

  always @(posedge clk) if (m2_we) begin
    int nx [8];
    checks++;
    if (m2_waddr != 5'(nwr)) begin failures++; $display("FAIL addr %0d exp %0d", m2_waddr, nwr); end
    for (int s = 0; s < 8; s++)
      if (int'(m2_wdata[s]) != alpha[s]) begin
        failures++; $display("FAIL step %0d state %0d: %0d exp %0d", nwr, s, m2_wdata[s], alpha[s]);
      end
    sm_step(0, alpha, int'(win[nwr].la), int'(win[nwr].ys), int'(win[nwr].yp), nx);
    alpha = nx;
    nwr++;
  end

  task automatic run(input bit f);
    int t0, t;
    for (int i = 0; i < L; i++) begin
      win[i].ys = chan_t'(int'($urandom_range(63)) - 32);
      win[i].yp = chan_t'(int'($urandom_range(63)) - 32);
      win[i].la = le_t'(int'($urandom_range(160)) - 80);
    end
    if (f) for (int s = 0; s < 8; s++) alpha[s] = (s == 0) ? 0 : -256;
    nwr = 0;
    @(negedge clk); start = 1; first = f;
    @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks += 2;
    if (nwr != L) begin failures++; $display("FAIL %0d writes", nwr); end
    if (t != L + 3) begin failures++; $display("FAIL window took %0d cycles", t); end
  endtask

  initial begin
    start = 0; first = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1); run(0); run(0);
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
