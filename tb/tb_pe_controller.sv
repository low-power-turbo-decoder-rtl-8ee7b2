// tb_pe_controller: the controller drives modelled PEs that answer with
// random delays. For a half-iteration of NW = 6 windows the testbench checks
// the schedule stage by stage (which PEs start, their windows and BP modes),
// that no stage ends before every started PE is done, that the soft-output
// drain is awaited, and the number of stages.
module tb_pe_controller;
  localparam int NW = 6;
  localparam int PW = $clog2(NW + 3);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic          go, wp_done, fp_done, pipe_busy;
  logic [1:0]    bp_done;
  logic          wp_start, fp_start, fp_first, half_done, busy, val_bp;
  logic [1:0]    bp_start;
  logic [1:0]    bp_mode [2];
  logic [PW-1:0] wp_win, fp_win, so_win;
  logic [PW-1:0] bp_win [2];
  int checks = 0, failures = 0;
  int stage = 0;
  int rem [4];          // remaining busy cycles of WP, FP, BP0, BP1
  logic drain_seen;

  pe_controller #(.NW(NW)) dut (.clk, .rst_n, .go, .wp_done, .fp_done, .bp_done, .pipe_busy,
    .wp_start, .fp_start, .fp_first, .bp_start, .bp_mode, .wp_win, .fp_win, .bp_win, .so_win,
    .val_bp, .half_done, .busy);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL stage %0d: %s", stage, what); end
  endtask

  // PE models: done drops on start, rises after a random delay
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (rem[i] > 0) rem[i] <= rem[i] - 1;
    if (wp_start)    rem[0] <= 3 + $urandom_range(10);
    if (fp_start)    rem[1] <= 3 + $urandom_range(10);
    if (bp_start[0]) rem[2] <= (bp_mode[0] == 0) ? 1 : 3 + $urandom_range(10);
    if (bp_start[1]) rem[3] <= (bp_mode[1] == 0) ? 1 : 3 + $urandom_range(10);
  end
  assign wp_done    = (rem[0] == 0);
  assign fp_done    = (rem[1] == 0);
  assign bp_done[0] = (rem[2] == 0);
  assign bp_done[1] = (rem[3] == 0);

  // schedule check at every start
  always @(posedge clk) if (wp_start || fp_start || bp_start != 0) begin
    int p, lb, vb;
    p  = stage;
    lb = p % 2; vb = 1 - p % 2;
    chk(wp_start == (p < NW), "WP start");
    if (wp_start) chk(int'(wp_win) == p, "WP window");
    chk(fp_start == (p >= 2 && p < NW + 2), "FP start");
    if (fp_start) begin
      chk(int'(fp_win) == p - 2, "FP window");
      chk(fp_first == (p == 2), "FP first");
    end
    if (p >= 2 && p < NW + 2) begin
      chk(bp_start[lb], "learning BP start");
      chk(bp_mode[lb] == ((p - 1 < NW) ? 2'd1 : 2'd0), "learning BP mode");
      chk(int'(bp_win[lb]) == p - 1, "learning window");
    end
    if (p >= 3) begin
      chk(bp_start[vb], "valid BP start");
      chk(bp_mode[vb] == 2'd2, "valid BP mode");
      chk(int'(bp_win[vb]) == p - 3, "valid window");
      chk(int'(val_bp) == vb, "val_bp");
      chk(int'(so_win) == p - 3, "so window");
    end
    // every PE from the last stage must be done
    chk(rem[0] == 0 && rem[1] == 0 && rem[2] == 0 && rem[3] == 0, "stage ended early");
    stage <= stage + 1;
  end

  initial begin
    go = 0; pipe_busy = 0; drain_seen = 0;
    for (int i = 0; i < 4; i++) rem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      stage = 0;
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      // hold the pipe busy for a while once the last stage is reached
      while (!half_done) begin
        @(negedge clk);
        if (stage == NW + 3 && rem[0] == 0 && rem[1] == 0 && rem[2] == 0 && rem[3] == 0 && !drain_seen) begin
          pipe_busy = 1;
          repeat (5) begin
            @(negedge clk);
            chk(!half_done, "half_done while pipe busy");
          end
          pipe_busy = 0;
          drain_seen = 1;
        end
      end
      chk(stage == NW + 3, $sformatf("%0d stages", stage));
      chk(drain_seen, "drain tested");
      drain_seen = 0;
      @(negedge clk);
      chk(!busy, "idle after half_done");
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
