// tb_giveup_detector: feeds iterations of extrinsic values (frame size 100)
// whose mean |Le| first grows and then shrinks, stays equal or grows again,
// and checks the sum, the eval pulse after the last value of each iteration,
// and the give-up flag (raised when the sum is not larger than the stored
// maximum). Also checks clr and that en = 0 stops the unit.
module tb_giveup_detector;
  import tdec_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;
  logic        en, clr, le_valid, eval, give_up;
  logic [10:0] frame_size;
  le_t         le;
  logic [17:0] sum_last, max_q;
  int checks = 0, failures = 0;
  int maxref = 0;

  giveup_detector #(.KMAX(1024)) dut (.clk, .rst_n, .en, .clr, .frame_size, .le_valid, .le,
                                      .eval, .give_up, .sum_last, .max_q);

  task automatic iteration(input int mag);
    int sum, n;
    bit saw;
    sum = 0; n = 100; saw = 0;
    for (int i = 0; i < n; i++) begin
      int m;
      m = mag + $urandom_range(4) - 2;
      if (m < 0) m = 0;
      if (m > 127) m = 127;
      @(negedge clk);
      le_valid = ($urandom_range(4) != 0);
      while (!le_valid) begin
        @(negedge clk);
        le_valid = 1;
      end
      le  = ($urandom & 1) ? le_t'(m) : le_t'(-m);
      sum += m;
      if (eval) saw = 1;
    end
    @(negedge clk); le_valid = 0;
    if (eval) saw = 1;
    checks += 3;
    if (!saw) begin failures++; $display("FAIL no eval"); end
    if (int'(sum_last) != sum) begin failures++; $display("FAIL sum %0d exp %0d", sum_last, sum); end
    if (give_up !== (sum <= maxref)) begin failures++; $display("FAIL give_up %0d sum %0d max %0d", give_up, sum, maxref); end
    if (sum > maxref) maxref = sum;
  endtask

  initial begin
    en = 1; clr = 0; le_valid = 0; le = 0; frame_size = 11'd100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; maxref = 0;
    iteration(10); iteration(20); iteration(40); iteration(30); iteration(60);
    // new packet
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; maxref = 0;
    checks++;
    if (max_q != 0 || give_up) begin failures++; $display("FAIL clr"); end
    iteration(5); iteration(5); iteration(50);
    // disabled: nothing happens
    en = 0;
    for (int i = 0; i < 150; i++) begin @(negedge clk); le_valid = 1; le = 8'sd3; end
    @(negedge clk); le_valid = 0;
    checks++;
    if (eval || give_up) begin failures++; $display("FAIL disabled unit acted"); end
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
