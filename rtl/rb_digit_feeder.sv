// rb_digit_feeder: operand registers of the digit-serial redundant-basis
// multipliers.
//
// B is padded with zeros to Q*P bits and cut into Q digits of P bits; digit j
// holds b[jP .. jP+P-1]. The feeder accepts an operand pair, then for Q
// cycles presents the held A together with one digit of B, most significant
// digit (j = Q-1) first, as the accumulator's Horner evaluation needs. Each
// digit carries a tag: valid, first (digit Q-1) and last (digit 0).
//
// The Q-cycle rhythm follows the original structures; holding all of B as a
// P*Q-bit shift register and the handshake are this design's choices.
// Handshake: a pair is taken at a clock edge where
// in_valid and in_ready are both high. in_ready is high when the feeder is
// idle or presenting the last digit of the previous pair, so back-to-back
// pairs give one product every Q cycles with no gap. The digits of a pair
// taken at edge t appear in the Q cycles after t. Reset (synchronous, active
// low) empties the feeder.
module rb_digit_feeder
  import rb_pkg::*;
#(
  parameter int unsigned N = RB_N,
  parameter int unsigned P = RB_P,
  parameter int unsigned Q = RB_Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] a_q,
  output logic [P-1:0] digit,
  output rb_tag_t      tag
);

  localparam int unsigned W  = P * Q;
  localparam int unsigned CW = (Q > 1) ? $clog2(Q) : 1;

  initial begin
    assert (W >= N) else $error("rb_digit_feeder: P*Q must cover N");
  end

  logic [W-1:0]  b_q;      // B, current digit in the top P bits
  logic [CW-1:0] cnt_q;    // digits already presented of the current pair
  logic          busy_q;
  logic          take;
  logic          at_last;

  assign at_last  = (cnt_q == CW'(Q - 1));
  assign in_ready = !busy_q || at_last;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      a_q    <= '0;
      b_q    <= '0;
    end else if (take) begin
      busy_q <= 1'b1;
      cnt_q  <= '0;
      a_q    <= a_in;
      b_q    <= W'(b_in);
    end else if (busy_q) begin
      busy_q <= !at_last;
      cnt_q  <= cnt_q + 1'b1;
      b_q    <= b_q << P;
    end
  end

  assign digit     = b_q[W-1 -: P];
  assign tag.valid = busy_q;
  assign tag.first = busy_q && (cnt_q == '0);
  assign tag.last  = busy_q && at_last;

endmodule
