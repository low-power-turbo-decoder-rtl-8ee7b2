// tb_soft_output: streams random alpha/beta/branch-metric sets into the
// soft-output unit, one per cycle with gaps, and checks LLR and Le against a
// reference (real max*, same 3-level pairing of the eight transitions per
// input value, saturation to 12 and 8 bits) and the 4-cycle latency.
module tb_soft_output;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic       in_valid;
  logic [9:0] in_tag, out_tag;
  sm_t        in_alpha [NSTATE];
  sm_t        in_beta  [NSTATE];
  gam_t       in_gam;
  le_t        in_la, out_le;
  chan_t      in_ys;
  llr_t       out_llr;
  logic       out_valid, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  soft_output #(.TAGW(10)) dut (.clk, .rst_n, .in_valid, .in_tag, .in_alpha, .in_beta, .in_gam,
                                .in_la, .in_ys, .out_valid, .out_tag, .out_llr, .out_le, .busy);

  typedef struct { int tag; int llr; int le; int t; } exp_t;
  exp_t q [$];

  function automatic int ms(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + $rtoi($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  function automatic int clip(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1; lo = -(1 << (w - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  function automatic exp_t model(int tag);
    int t [2][8];
    int l [2];
    logic [3:0] r;
    exp_t e;
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        int g;
        r = rsc_step(3'(s), 1'(u));
        g = (u == r[0]) ? int'(in_gam.a) : int'(in_gam.b);
        if (u == 0) g = -g;
        t[u][s] = int'(in_alpha[s]) + g + int'(in_beta[r[3:1]]);
      end
    for (int u = 0; u < 2; u++)
      l[u] = ms(ms(ms(t[u][0], t[u][1]), ms(t[u][2], t[u][3])), ms(ms(t[u][4], t[u][5]), ms(t[u][6], t[u][7])));
    e.tag = tag;
    e.llr = clip(l[1] - l[0], 12);
    e.le  = clip(e.llr - int'(in_la) - int'(in_ys), 8);
    e.t   = cyc + 4;
    return e;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_tag != 10'(e.tag) || int'(out_llr) != e.llr || int'(out_le) != e.le || cyc != e.t) begin
          failures++;
          $display("FAIL tag %0d: llr %0d exp %0d, le %0d exp %0d, cycle %0d exp %0d",
                   out_tag, out_llr, e.llr, out_le, e.le, cyc, e.t);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_tag   = 10'(i);
      for (int s = 0; s < 8; s++) begin
        in_alpha[s] = sm_t'(int'($urandom_range(1200)) - 600);
        in_beta[s]  = sm_t'(int'($urandom_range(1200)) - 600);
      end
      if (i % 50 == 0) for (int s = 0; s < 8; s++) in_alpha[s] = (s < 4) ? 11'sd1000 : -11'sd1000;
      in_gam.a = bm_t'(int'($urandom_range(400)) - 200);
      in_gam.b = bm_t'(int'($urandom_range(400)) - 200);
      in_la    = le_t'(int'($urandom_range(255)) - 128);
      in_ys    = chan_t'(int'($urandom_range(63)) - 32);
      if (in_valid) q.push_back(model(i));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
