// rb_ffa: finite field accumulator (FFA) of the digit-serial redundant-basis
// multipliers.
//
// The product is C = sum_j beta^(jP) * W_j, where W_j is the partial product
// word of digit j of B. The digits arrive most significant first, so the
// accumulator evaluates this by Horner's rule:
//     C <- W               on the first digit of a product,
//     C <- C*beta^P ^ W    on every later digit.
// C*beta^P is a fixed rotation of the register by P places, so the unit is N
// XOR gates and an N-bit register (critical path one XOR). The clear on the
// first digit is this design's way of starting a new product without a bubble.
//
// Interface: w_tag/w carry one word per cycle when w_tag.valid is high.
// Timing: the register takes the word at the clock edge; when that word was
// tagged last, out_valid is high for the following cycle while c_out holds
// the finished product. Reset (synchronous, active low) clears the register.
module rb_ffa
  import rb_pkg::*;
#(
  parameter int unsigned N = RB_N,
  parameter int unsigned P = RB_P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rb_tag_t      w_tag,
  input  logic [N-1:0] w,
  output logic         out_valid,
  output logic [N-1:0] c_out
);

  localparam int unsigned S = P % N;

  logic [N-1:0] acc_q;
  logic [N-1:0] acc_rot;

  if (S == 0) begin : g_s0
    assign acc_rot = acc_q;
  end else begin : g_sn
    assign acc_rot = {acc_q[N-1-S:0], acc_q[N-1:N-S]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= w_tag.valid & w_tag.last;
      if (w_tag.valid) begin
        acc_q <= w_tag.first ? w : (acc_rot ^ w);
      end
    end
  end

  assign c_out = acc_q;

endmodule
