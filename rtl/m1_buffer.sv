// m1_buffer: memory M1, the window buffer of received symbols.
// Four banks of L words; each word holds one trellis step's systematic value,
// parity value and a-priori value (tdec_pkg::sym_t). The write processor
// fills one bank per window period while three readers (forward processor,
// learning backward processor, valid backward processor) each read a
// different bank, so every bank sees at most one write and one read per
// cycle, as a dual-port SRAM bank would. Reads are registered (one cycle).
// An assertion checks that the three readers never share a bank.
module m1_buffer
  import tdec_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned NBANK = 4,
  localparam int unsigned AW   = $clog2(L),
  localparam int unsigned BW   = $clog2(NBANK),
  localparam int unsigned NRD  = 3
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  sym_t          wdata,
  input  logic          re    [NRD],
  input  logic [BW-1:0] rbank [NRD],
  input  logic [AW-1:0] raddr [NRD],
  output sym_t          rdata [NRD]
);
  sym_t mem [NBANK][L];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
    for (int r = 0; r < NRD; r++)
      if (re[r]) rdata[r] <= mem[rbank[r]][raddr[r]];
  end

  // Each bank is a 1W/1R memory: readers must be on distinct banks.
  always_ff @(posedge clk) begin
    for (int a = 0; a < NRD; a++)
      for (int b = a + 1; b < NRD; b++)
        assert (!(re[a] && re[b] && rbank[a] == rbank[b]))
          else $error("m1_buffer: readers %0d and %0d share bank %0d", a, b, rbank[a]);
  end
endmodule
