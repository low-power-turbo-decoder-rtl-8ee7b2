// tb_dp_ram: random simultaneous writes and reads against a shadow array;
// checks the one-cycle read latency and that a read of the address being
// written returns the old contents.
module tb_dp_ram;
  localparam int W = 8, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic         we, re;
  logic [5:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] expv;
      @(negedge clk);
      we = $urandom_range(1); re = 1;
      waddr = 6'($urandom_range(DEPTH - 1));
      raddr = (i % 7 == 0) ? waddr : 6'($urandom_range(DEPTH - 1));
      wdata = W'($urandom);
      expv = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata !== expv) begin failures++; $display("FAIL addr %0d: %h exp %h", raddr, rdata, expv); end
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
