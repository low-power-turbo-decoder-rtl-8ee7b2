// tb_m1_buffer: fills the four banks, then in every cycle writes one bank
// while the three read ports read the other three banks (the access pattern
// of one window period), checking all read data against a shadow copy.
module tb_m1_buffer;
  import tdec_pkg::*;
  localparam int L = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       we;
  logic [1:0] wbank;
  logic [4:0] waddr;
  sym_t       wdata;
  logic       re    [3];
  logic [1:0] rbank [3];
  logic [4:0] raddr [3];
  sym_t       rdata [3];
  sym_t       shadow [4][L];
  int checks = 0, failures = 0;

  m1_buffer #(.L(L)) dut (.clk, .we, .wbank, .waddr, .wdata, .re, .rbank, .raddr, .rdata);

  initial begin
    we = 0; wbank = 0; waddr = 0; wdata = '0;
    for (int r = 0; r < 3; r++) begin re[r] = 0; rbank[r] = 0; raddr[r] = 0; end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < L; i++) begin
        @(negedge clk); we = 1; wbank = 2'(b); waddr = 5'(i); wdata = sym_t'($urandom); shadow[b][i] = wdata;
      end
    for (int p = 0; p < 12; p++)
      for (int i = 0; i < L; i++) begin
        sym_t expv [3];
        @(negedge clk);
        we = 1; wbank = 2'(p); waddr = 5'(i); wdata = sym_t'($urandom);
        for (int r = 0; r < 3; r++) begin
          re[r] = 1; rbank[r] = 2'(p + r + 1); raddr[r] = 5'($urandom_range(L - 1));
          expv[r] = shadow[rbank[r]][raddr[r]];
        end
        @(posedge clk);
        shadow[wbank][waddr] = wdata;
        @(negedge clk);
        we = 0;
        for (int r = 0; r < 3; r++) begin
          re[r] = 0;
          checks++;
          if (rdata[r] !== expv[r]) begin failures++; $display("FAIL port %0d", r); end
        end
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
