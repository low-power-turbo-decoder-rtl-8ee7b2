// tdec_pkg: shared types, widths and trellis helpers of the sliding-window
// Log-MAP turbo decoder with early give-up.
//
// Fixed-point formats follow the "+D1+Q1" quantization scheme (3 fractional
// bits everywhere): channel values q(6,3), branch metrics q(9,3), state
// metrics q(11,3), LLR q(12,3), a-priori / extrinsic values q(8,3).
// The constituent code is the 3GPP rate-1/2 RSC with feedback 1+D^2+D^3
// and feed-forward 1+D+D^3. A state is the 3-bit shift register {s1,s2,s3}
// with s1 (most recent) as the MSB.
package tdec_pkg;

  localparam int unsigned NSTATE = 8;    // 3GPP trellis states
  // every fixed-point format below carries 3 fractional bits
  localparam int unsigned YW     = 6;    // received value width, q(6,3)
  localparam int unsigned BMW    = 9;    // branch metric width, q(9,3)
  localparam int unsigned SMW    = 11;   // state metric width, q(11,3)
  localparam int unsigned LLRW   = 12;   // soft output width, q(12,3)
  localparam int unsigned LEW    = 8;    // a-priori / extrinsic width, q(8,3)

  typedef logic signed [YW-1:0]   chan_t;
  typedef logic signed [BMW-1:0]  bm_t;
  typedef logic signed [SMW-1:0]  sm_t;
  typedef logic signed [LLRW-1:0] llr_t;
  typedef logic signed [LEW-1:0]  le_t;
  typedef sm_t                    sm_vec_t [NSTATE];

  // One trellis step's worth of input, as kept in the window buffer M1.
  typedef struct packed {
    chan_t ys;   // systematic channel value (already scaled by Lc)
    chan_t yp;   // parity channel value (already scaled by Lc)
    le_t   la;   // a-priori value of this bit
  } sym_t;

  // Branch metrics of one step: A = BM(+1,+1) = -BM(-1,-1),
  // B = BM(+1,-1) = -BM(-1,+1).
  typedef struct packed {
    bm_t a;
    bm_t b;
  } gam_t;

  // Next state of the RSC encoder from state s with input u.
  function automatic logic [2:0] trel_next(input logic [2:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[0];           // feedback 1+D^2+D^3
    return {fb, s[2], s[1]};
  endfunction

  // Parity output of the RSC encoder from state s with input u.
  function automatic logic trel_par(input logic [2:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[0];
    return fb ^ s[2] ^ s[0];        // feed-forward 1+D+D^3
  endfunction

  // Branch metric of transition (systematic u, parity p) from A and B.
  function automatic bm_t branch_metric(input gam_t g, input logic u, input logic p);
    unique case ({u, p})
      2'b11:   return g.a;
      2'b00:   return -g.a;
      2'b10:   return g.b;
      default: return -g.b;
    endcase
  endfunction

  // Log-MAP correction ln(1+exp(-d)) for d in q(.,3), rounded to q(.,3).
  // Table entry i = round(8*ln(1+exp(-i/8))); zero from i = 22 on, the
  // smallest i with ln(1+exp(-i/8)) <= 2^-(3+1).
  function automatic logic [2:0] maxstar_corr(input logic [12:0] d);
    logic [2:0] c;
    if (d >= 13'd22)      c = 3'd0;
    else if (d >= 13'd13) c = 3'd1;
    else if (d >= 13'd9)  c = 3'd2;
    else if (d >= 13'd5)  c = 3'd3;
    else if (d >= 13'd3)  c = 3'd4;
    else if (d >= 13'd1)  c = 3'd5;
    else                  c = 3'd6;
    return c;
  endfunction

  // Saturate a wide signed value to w bits (w <= 16).
  function automatic logic signed [15:0] sat(input logic signed [15:0] v, input int unsigned w);
    logic signed [15:0] hi, lo;
    hi = (16'sd1 <<< (w - 1)) - 16'sd1;
    lo = -(16'sd1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  // Outcome of one frame decode.
  typedef enum logic [1:0] {
    RES_NONE   = 2'd0,
    RES_VALID  = 2'd1,   // CRC passed
    RES_GIVEUP = 2'd2,   // early give-up, retransmission requested
    RES_MAXIT  = 2'd3    // maximum iterations reached, retransmission requested
  } result_e;

endpackage
