// acso: Add-Compare-Select-Offset unit, the recursion cell of the forward and
// backward state metric processors. It adds a branch metric to each of the two
// candidate state metrics, selects the larger sum and adds the Log-MAP offset
// ln(1+exp(-|difference|)), i.e. out = max*(m0+g0, m1+g1).
// Combinational; the result is 13 bits wide and is normalised and saturated
// to the state metric width by the processor that owns the register.
module acso
  import tdec_pkg::*;
(
  input  sm_t                 m0,
  input  bm_t                 g0,
  input  sm_t                 m1,
  input  bm_t                 g1,
  output logic signed [12:0]  out
);
  logic signed [12:0] s0, s1;

  always_comb begin
    s0 = 13'(m0) + 13'(g0);
    s1 = 13'(m1) + 13'(g1);
  end

  max_star #(.W(13)) u_ms (.x(s0), .y(s1), .z(out));
endmodule
