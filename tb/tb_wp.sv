// tb_wp: drives the write processor with behavioural frame memories, an
// extrinsic memory and an interleaver table (reference 3GPP interleaver,
// K = 1024) and checks every M1 write: bank, offset and the symbol
// {ys, yp, La} for the first half-iteration (natural order, parity 1),
// the second (interleaved systematic and a-priori values, parity 2) and
// with the a-priori value forced to zero. Also checks the L+2 window time.
module tb_wp;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  localparam int K = 1024, L = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge so the asynchronous reset fires before the first clock
  always #5 clk = ~clk;

  logic        start, half2, zero_la, done, rd_en, m1_we;
  logic [4:0]  win;
  logic [9:0]  il_addr, il_data, sys_raddr, par_raddr, ext_raddr;
  chan_t       sys_rdata;
  logic [11:0] par_rdata;
  le_t         ext_rdata;
  logic [1:0]  m1_wbank;
  logic [4:0]  m1_waddr;
  sym_t        m1_wdata;
  chan_t sys [K];
  logic [11:0] par [K];
  le_t   ext [K];
  int    pi [];
  int checks = 0, failures = 0, nw = 0;
  int cur_win;

  wp #(.K(K), .L(L)) dut (.clk, .rst_n, .start, .win, .half2, .zero_la, .done,
    .il_addr, .il_data, .rd_en, .sys_raddr, .sys_rdata, .par_raddr, .par_rdata,
    .ext_raddr, .ext_rdata, .m1_we, .m1_wbank, .m1_waddr, .m1_wdata);

  always @(posedge clk) begin
    il_data <= 10'(pi[il_addr]);
    if (rd_en) begin
      sys_rdata <= sys[sys_raddr];
      par_rdata <= par[par_raddr];
      ext_rdata <= ext[ext_raddr];
    end
  end

  always @(posedge clk) if (m1_we) begin
    int k, src;
    sym_t e;
    k   = cur_win * L + int'(m1_waddr);
    src = half2 ? pi[k] : k;
    e.ys = sys[src];
    e.yp = half2 ? chan_t'(par[k][5:0]) : chan_t'(par[k][11:6]);
    e.la = zero_la ? '0 : ext[src];
    checks++;
    if (m1_wbank != 2'(cur_win) || m1_waddr != 5'(nw) || m1_wdata != e) begin
      failures++;
      $display("FAIL win %0d off %0d: bank %0d data %h exp %h", cur_win, m1_waddr, m1_wbank, m1_wdata, e);
    end
    nw++;
  end

  task automatic run(input int w, input bit h2, input bit z);
    int t;
    cur_win = w; nw = 0;
    @(negedge clk); start = 1; win = 5'(w); half2 = h2; zero_la = z;
    @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks += 2;
    if (nw != L) begin failures++; $display("FAIL %0d writes", nw); end
    if (t != L + 4) begin failures++; $display("FAIL window took %0d cycles", t); end
  endtask

  initial begin
    interleaver(K, pi);
    for (int k = 0; k < K; k++) begin
      sys[k] = chan_t'($urandom); par[k] = 12'($urandom); ext[k] = le_t'($urandom);
    end
    start = 0; win = 0; half2 = 0; zero_la = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0, 1); run(1, 0, 0); run(5, 0, 0); run(31, 0, 0);
    run(0, 1, 0); run(2, 1, 0); run(17, 1, 0); run(31, 1, 1);
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
