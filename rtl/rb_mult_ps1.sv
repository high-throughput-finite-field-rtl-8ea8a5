// rb_mult_ps1: digit-serial redundant-basis multiplier, structure PS-I.
//
// C = A*B in the ring GF(2)[beta]/(beta^N - 1). B is consumed one P-bit digit
// per cycle, most significant digit first (rb_digit_feeder). For the digit in
// flight, a systolic chain of S = P/D PPGUs builds the partial product word
//     W = XOR_i digit[i] & (A * beta^i),   i = 0..P-1,
// stage k handling bits kD..kD+D-1: stage 0 is an AND array only, every later
// stage ANDs its D bits with rotated copies of A and XORs them onto the
// registered sum from the stage before. The accumulator (rb_ffa) then folds
// the Q words together as C <- C*beta^P ^ W.
//
// Timing, as for the structure this follows: critical path
// T_A + (1 + ceil(log2 D))*T_X, one product every Q cycles, and P/D + Q cycles
// from the cycle the first digit leaves the feeder to the cycle out_valid is
// high (one more counting from the edge that accepts the operands).
//
// Own choices of this design: because a product lasts Q cycles and the chain
// is P/D stages deep, several products are in the chain at once, so A and the
// digit travel down the chain beside the partial sum (one A register and one
// digit register per stage). The valid/first/last tags travel the same way.
// Operands enter through a valid/ready handshake; results leave as a
// one-cycle out_valid pulse with no back-pressure.
module rb_mult_ps1
  import rb_pkg::*;
#(
  parameter int unsigned N = RB_N,
  parameter int unsigned P = RB_P,
  parameter int unsigned Q = RB_Q,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic         out_valid,
  output logic [N-1:0] c_out
);

  localparam int unsigned S = P / D;  // number of PPGU stages

  initial begin
    assert (S * D == P) else $error("rb_mult_ps1: D must divide P");
  end

  // Index 0 is the feeder output; index k+1 is the register after stage k.
  logic [N-1:0] a_pipe   [S];
  logic [P-1:0] dg_pipe  [S];
  rb_tag_t      tag_pipe [S+1];
  logic [N-1:0] sum_q    [S];

  rb_digit_feeder #(.N(N), .P(P), .Q(Q)) u_feeder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .a_in     (a_in),
    .b_in     (b_in),
    .a_q      (a_pipe[0]),
    .digit    (dg_pipe[0]),
    .tag      (tag_pipe[0])
  );

  for (genvar k = 0; k < S; k++) begin : g_stage
    logic [N-1:0] pp;

    rb_ppgu #(.N(N), .D(D), .SHIFT0(k * D)) u_ppgu (
      .a  (a_pipe[k]),
      .b  (dg_pipe[k][k*D +: D]),
      .pp (pp)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) tag_pipe[k+1] <= RB_TAG_IDLE;
      else        tag_pipe[k+1] <= tag_pipe[k];
    end

    if (k == 0) begin : g_head
      always_ff @(posedge clk) sum_q[k] <= pp;
    end else begin : g_body
      always_ff @(posedge clk) sum_q[k] <= sum_q[k-1] ^ pp;
    end

    if (k < S - 1) begin : g_fwd
      always_ff @(posedge clk) begin
        a_pipe[k+1]  <= a_pipe[k];
        dg_pipe[k+1] <= dg_pipe[k];
      end
    end
  end

  rb_ffa #(.N(N), .P(P)) u_ffa (
    .clk       (clk),
    .rst_n     (rst_n),
    .w_tag     (tag_pipe[S]),
    .w         (sum_q[S-1]),
    .out_valid (out_valid),
    .c_out     (c_out)
  );

endmodule
