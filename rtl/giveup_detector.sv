// giveup_detector: early give-up detection unit.
// It sums |Le| of the extrinsic values of one iteration; a down counter,
// loaded with the frame size, marks the last value of the iteration. At that
// point the sum is compared with the Max register, which holds the sum of the
// previous iteration: if the new sum is larger it is stored in Max and
// decoding may go on; if it is not larger, the mean |Le| has stopped growing
// (the extrinsic information oscillates) and give_up is raised.
// clr (start of a packet) empties the Max register, so the first iteration
// never gives up unless its sum is zero. en = 0 stops the unit (it then
// neither accumulates nor flags). eval pulses one cycle after the last value
// of an iteration; give_up is valid with it and held until the next eval/clr.
module giveup_detector
  import tdec_pkg::*;
#(
  parameter int unsigned KMAX = 1024,
  localparam int unsigned KW  = $clog2(KMAX + 1),
  localparam int unsigned SW  = $clog2(KMAX) + LEW        // sum width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic [KW-1:0] frame_size,
  input  logic          le_valid,
  input  le_t           le,
  output logic          eval,
  output logic          give_up,
  output logic [SW-1:0] sum_last,
  output logic [SW-1:0] max_q
);
  logic [KW-1:0] cnt;
  logic [SW-1:0] acc;
  logic [SW-1:0] acc_nxt;
  logic [LEW-1:0] mag;

  always_comb begin
    mag     = le[LEW-1] ? LEW'(-le) : LEW'(le);
    acc_nxt = acc + SW'(mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      acc      <= '0;
      max_q    <= '0;
      eval     <= 1'b0;
      give_up  <= 1'b0;
      sum_last <= '0;
    end else begin
      eval <= 1'b0;
      if (clr) begin
        cnt     <= frame_size;
        acc     <= '0;
        max_q   <= '0;
        give_up <= 1'b0;
      end else if (en && le_valid) begin
        if (cnt == KW'(1)) begin
          // last value of the iteration: compare and reload
          eval     <= 1'b1;
          sum_last <= acc_nxt;
          acc      <= '0;
          cnt      <= frame_size;
          if (acc_nxt > max_q) begin
            max_q   <= acc_nxt;
            give_up <= 1'b0;
          end else begin
            give_up <= 1'b1;
          end
        end else begin
          acc <= acc_nxt;
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule
