// crc16: serial CRC-16 checker used as the termination test (outer code).
// Generator g(D) = D^16 + D^12 + D^5 + 1 (the 3GPP gCRC16). Bits enter one
// per cycle, first bit first, while in_valid is high; clr empties the
// register. A frame whose last 16 bits are the CRC parity of the preceding
// bits (highest-order parity bit first) leaves the register at zero, which
// is signalled by zero. One cycle from a bit to its effect on crc/zero.
module crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        in_valid,
  input  logic        in_bit,
  output logic [15:0] crc,
  output logic        zero
);
  localparam logic [15:0] POLY = 16'h1021;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        crc <= '0;
    else if (clr)      crc <= '0;
    else if (in_valid) crc <= {crc[14:0], 1'b0} ^ ((in_bit ^ crc[15]) ? POLY : 16'h0000);
  end

  assign zero = (crc == 16'h0000);
endmodule
