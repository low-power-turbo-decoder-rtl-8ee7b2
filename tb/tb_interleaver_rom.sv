// tb_interleaver_rom: (1) K = 40: the read-out order of the 5 x 8 example
// matrix after intra- and inter-row permutation, listed in the testbench;
// (2) K = 1024 (the default): every entry on both ports against the
// reference interleaver of tb_tdec_pkg, and that the table is a permutation.
module tb_interleaver_rom;
  import tb_tdec_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] a40, b40, da40, db40;
  logic [9:0] a, b, da, db;
  int checks = 0, failures = 0;
  int pi [];
  bit seen [1024];
  // 1-based input index of each output position for K = 40
  int exp40 [40] = '{40, 26, 18, 10, 2, 36, 28, 22, 12, 6, 35, 27, 21, 11, 5, 39, 31, 23, 15, 7,
                     37, 29, 19, 13, 3, 38, 30, 20, 14, 4, 33, 25, 17, 9, 1, 34, 32, 24, 16, 8};

  interleaver_rom #(.K(40)) dut40 (.clk, .addr_a(a40), .data_a(da40), .addr_b(b40), .data_b(db40));
  interleaver_rom dut (.clk, .addr_a(a), .data_a(da), .addr_b(b), .data_b(db));

  initial begin
    for (int k = 0; k < 40; k++) begin
      @(negedge clk); a40 = 6'(k); b40 = 6'(39 - k);
      @(negedge clk);
      checks += 2;
      if (int'(da40) != exp40[k] - 1)      begin failures++; $display("FAIL K=40 pi(%0d)=%0d exp %0d", k, da40, exp40[k] - 1); end
      if (int'(db40) != exp40[39 - k] - 1) begin failures++; $display("FAIL K=40 port b"); end
    end
    interleaver(1024, pi);
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk); a = 10'(k); b = 10'(1023 - k);
      @(negedge clk);
      checks += 2;
      if (int'(da) != pi[k])        begin failures++; $display("FAIL pi(%0d)=%0d exp %0d", k, da, pi[k]); end
      if (int'(db) != pi[1023 - k]) begin failures++; $display("FAIL port b at %0d", 1023 - k); end
      seen[da] = 1;
    end
    checks++;
    foreach (seen[i]) if (!seen[i]) begin failures++; $display("FAIL %0d never produced", i); break; end
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
