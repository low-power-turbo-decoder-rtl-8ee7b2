// tb_crc16: random messages with their CRC-16 parity appended must leave the
// register at zero; a single flipped bit must not; the register value after
// the message part must equal the reference remainder.
module tb_crc16;
  import tb_tdec_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;
  logic clr, in_valid, in_bit, zero;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.clk, .rst_n, .clr, .in_valid, .in_bit, .crc, .zero);

  task automatic frame(input int n, input bit corrupt);
    bit m [];
    logic [15:0] c;
    int flip;
    m = new[n + 16];
    for (int i = 0; i < n; i++) m[i] = $urandom & 1;
    c = crc16_ref(m, n);
    for (int i = 0; i < 16; i++) m[n + i] = c[15 - i];
    flip = $urandom_range(n + 15);
    if (corrupt) m[flip] = !m[flip];
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int i = 0; i < n + 16; i++) begin
      in_valid = 1; in_bit = m[i];
      @(negedge clk);
      if (i == n - 1 && !corrupt) begin
        checks++;
        if (crc !== c) begin failures++; $display("FAIL remainder %h exp %h", crc, c); end
      end
    end
    in_valid = 0;
    checks++;
    if (zero !== !corrupt) begin failures++; $display("FAIL n=%0d corrupt=%0d zero=%0d", n, corrupt, zero); end
  endtask

  initial begin
    clr = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) frame(8 + $urandom_range(200), i % 2);
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
