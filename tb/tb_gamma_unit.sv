// tb_gamma_unit: checks A = floor((La+ys+yp)/2) and B = floor((La+ys-yp)/2)
// for random and extreme inputs (combinational unit).
module tb_gamma_unit;
  import tdec_pkg::*;
  sym_t sym;
  gam_t gam;
  int checks = 0, failures = 0;

  gamma_unit dut (.sym, .gam);

  task automatic one(int la, int ys, int yp);
    int ea, eb;
    sym.la = le_t'(la); sym.ys = chan_t'(ys); sym.yp = chan_t'(yp);
    #1;
    ea = $rtoi($floor(real'(la + ys + yp) / 2.0));
    eb = $rtoi($floor(real'(la + ys - yp) / 2.0));
    checks += 2;
    if (int'(gam.a) != ea) begin failures++; $display("FAIL A %0d %0d %0d: %0d exp %0d", la, ys, yp, gam.a, ea); end
    if (int'(gam.b) != eb) begin failures++; $display("FAIL B %0d %0d %0d: %0d exp %0d", la, ys, yp, gam.b, eb); end
  endtask

  initial begin
    one(127, 31, 31); one(-128, -32, -32); one(-128, -32, 31); one(0, 0, 0); one(1, 0, 0); one(-1, 0, 0);
    for (int i = 0; i < 2000; i++)
      one(int'($urandom_range(255)) - 128, int'($urandom_range(63)) - 32, int'($urandom_range(63)) - 32);
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
