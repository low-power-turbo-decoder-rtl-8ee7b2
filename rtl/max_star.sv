// max_star: the Log-MAP max* operator, max*(x,y) = max(x,y) + ln(1+exp(-|x-y|)).
// Compare-select picks the larger input; the correction term comes from the
// small lookup table in tdec_pkg (q(.,3) format, zero for |x-y| >= 22/8).
// Purely combinational. Inputs are W-bit signed; the output is W bits and
// the caller leaves one bit of headroom for the correction (at most +6 LSB).
module max_star #(
  parameter int unsigned W = 13
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] z
);
  import tdec_pkg::*;

  logic signed [W:0]   diff;
  logic        [W:0]   adiff;
  logic        [12:0]  dsat;

  always_comb begin
    diff  = (W+1)'(x) - (W+1)'(y);
    adiff = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
    dsat  = (adiff > (W+1)'(8191)) ? 13'd8191 : 13'(adiff);
    z     = (diff[W] ? y : x) + W'(signed'({1'b0, maxstar_corr(dsat)}));
  end
endmodule
