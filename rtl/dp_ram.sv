// dp_ram: simple dual-port RAM, one write port and one read port, both
// synchronous to clk. Read data appear one cycle after the address
// (registered read). Writing and reading the same address in one cycle
// returns the old contents. Used for the frame (channel value) memories,
// the extrinsic memory that also holds the reuse state, the hard-decision
// memory and the two banks of the forward metric memory M2.
module dp_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
