// m2_buffer: memory M2, the forward state metric store. Two banks of L words,
// each word the eight alpha values of one trellis step (8 x SMW bits). The
// forward processor writes the bank of the window it is processing while the
// valid backward processor reads the other bank (ping-pong), so each bank is
// a dual-port RAM (tdec dp_ram) with one writer and one reader.
// Read data appear one cycle after the address.
module m2_buffer
  import tdec_pkg::*;
#(
  parameter int unsigned L = 32,
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned WW = NSTATE * SMW
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  sm_t           wdata [NSTATE],
  input  logic          re,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output sm_t           rdata [NSTATE]
);
  logic [WW-1:0] wword;
  logic [WW-1:0] rword [2];
  logic          rbank_q;

  always_comb
    for (int s = 0; s < NSTATE; s++) wword[s*SMW +: SMW] = wdata[s];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dp_ram #(.W(WW), .DEPTH(L)) u_bank (
      .clk  (clk),
      .we   (we && (wbank == 1'(b))),
      .waddr(waddr),
      .wdata(wword),
      .re   (re && (rbank == 1'(b))),
      .raddr(raddr),
      .rdata(rword[b])
    );
  end

  always_ff @(posedge clk) if (re) rbank_q <= rbank;

  always_comb
    for (int s = 0; s < NSTATE; s++) rdata[s] = rword[rbank_q][s*SMW +: SMW];
endmodule
