// tb_m2_buffer: ping-pong use of the two alpha banks: while one bank is
// written with random alpha vectors the other is read back in reverse
// order, as the forward and valid backward processors do; checks all data.
module tb_m2_buffer;
  import tdec_pkg::*;
  localparam int L = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       we, wbank, re, rbank;
  logic [4:0] waddr, raddr;
  sm_t        wdata [NSTATE];
  sm_t        rdata [NSTATE];
  sm_t        shadow [2][L][NSTATE];
  int checks = 0, failures = 0;

  m2_buffer #(.L(L)) dut (.clk, .we, .wbank, .waddr, .wdata, .re, .rbank, .raddr, .rdata);

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0;
    for (int s = 0; s < NSTATE; s++) wdata[s] = '0;
    for (int p = 0; p < 8; p++)
      for (int i = 0; i < L; i++) begin
        sm_t expv [NSTATE];
        @(negedge clk);
        we = 1; wbank = p[0]; waddr = 5'(i);
        for (int s = 0; s < NSTATE; s++) wdata[s] = sm_t'($urandom);
        re = (p > 0); rbank = ~p[0]; raddr = 5'(L - 1 - i);
        expv = shadow[rbank][raddr];
        @(posedge clk);
        shadow[wbank][waddr] = wdata;
        @(negedge clk);
        we = 0;
        if (re) begin
          checks++;
          for (int s = 0; s < NSTATE; s++)
            if (rdata[s] !== expv[s]) begin failures++; $display("FAIL p%0d i%0d s%0d", p, i, s); break; end
        end
        re = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
