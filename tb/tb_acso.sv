// tb_acso: checks the ACSO cell against max*(m0+g0, m1+g1) computed with
// real arithmetic: max + round(8*ln(1+exp(-|d|/8))). Random and corner
// operands; the cell is combinational.
module tb_acso;
  import tdec_pkg::*;
  sm_t m0, m1;
  bm_t g0, g1;
  logic signed [12:0] out;
  int checks = 0, failures = 0;

  acso dut (.m0, .g0, .m1, .g1, .out);

  function automatic int ref_acso(int a0, int b0, int a1, int b1);
    int s0, s1, d;
    s0 = a0 + b0; s1 = a1 + b1;
    d  = (s0 > s1) ? s0 - s1 : s1 - s0;
    return ((s0 > s1) ? s0 : s1) + $rtoi($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 8.0)) + 0.5));
  endfunction

  task automatic one(int a0, int b0, int a1, int b1);
    m0 = sm_t'(a0); g0 = bm_t'(b0); m1 = sm_t'(a1); g1 = bm_t'(b1);
    #1;
    checks++;
    if (int'(out) != ref_acso(a0, b0, a1, b1)) begin
      failures++;
      $display("FAIL: %0d %0d %0d %0d -> %0d exp %0d", a0, b0, a1, b1, out, ref_acso(a0, b0, a1, b1));
    end
  endtask

  initial begin
    for (int d = -30; d <= 30; d++) one(100, 0, 100 + d, 0);
    one(1023, 255, 1023, 255);
    one(-1024, -256, -1024, -256);
    for (int i = 0; i < 2000; i++)
      one(int'($urandom_range(2047)) - 1024, int'($urandom_range(511)) - 256,
          int'($urandom_range(2047)) - 1024, int'($urandom_range(511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
