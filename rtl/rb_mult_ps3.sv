// rb_mult_ps3: digit-serial redundant-basis multiplier, structure PS-III.
//
// Same arithmetic as PS-I (rb_mult_ps1): for each P-bit digit of B the word
// W = XOR_i digit[i] & (A * beta^i) is formed in a systolic chain and folded
// into the accumulator as C <- C*beta^P ^ W. PS-III cuts the chain once more:
// every AND array (one bit of the digit against one rotated copy of A) has
// its own product register, and every XOR stage adds a registered product to
// a registered partial sum. No path holds more than one AND or one XOR, so
// the clock period is set by a single XOR gate (T_X).
//
// Schedule of one digit word that leaves the feeder in cycle c: the products
// of bits 0 and 1 are registered at the end of cycle c+1, and the product of
// bit k >= 2 at the end of cycle c+k; the sum of bits 0..k is registered at
// the end of cycle c+k+1; the accumulator takes the full word at the end of
// cycle c+P+1. Hence one product every Q cycles and P + Q + 1 cycles from
// the cycle the first digit leaves the feeder to the out_valid cycle, one
// more than PS-I.
//
// Own choices of this design: as in PS-I, A and the digit travel down the
// chain with the partial sum, because several products are in flight; the
// valid/first/last tags travel the same way. P must be at least 2.
module rb_mult_ps3
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
  output logic         out_valid,
  output logic [N-1:0] c_out
);

  initial begin
    assert (P >= 2) else $error("rb_mult_ps3: P must be at least 2");
  end

  // a_pipe/dg_pipe[k] hold a word in cycle c+k; tag_pipe[k] likewise.
  logic [N-1:0] a_pipe   [P];
  logic [P-1:0] dg_pipe  [P];
  rb_tag_t      tag_pipe [P+2];
  logic [N-1:0] prod_q   [P];
  logic [N-1:0] sum_q    [1:P-1];  // sum of bits 0..k; the first is prod 0 ^ prod 1

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

  for (genvar k = 0; k < P + 1; k++) begin : g_tag
    always_ff @(posedge clk) begin
      if (!rst_n) tag_pipe[k+1] <= RB_TAG_IDLE;
      else        tag_pipe[k+1] <= tag_pipe[k];
    end
  end

  for (genvar k = 0; k < P - 1; k++) begin : g_fwd
    always_ff @(posedge clk) begin
      a_pipe[k+1]  <= a_pipe[k];
      dg_pipe[k+1] <= dg_pipe[k];
    end
  end

  for (genvar k = 0; k < P; k++) begin : g_bit
    // Bits 0 and 1 both take their operands from stage 1, so that their
    // products are ready together.
    localparam int unsigned SRC = (k == 0) ? 1 : k;
    logic [N-1:0] pp;

    rb_ppgu #(.N(N), .D(1), .SHIFT0(k)) u_ppgu (
      .a  (a_pipe[SRC]),
      .b  (dg_pipe[SRC][k]),
      .pp (pp)
    );

    always_ff @(posedge clk) prod_q[k] <= pp;

    if (k == 1) begin : g_first_sum
      always_ff @(posedge clk) sum_q[k] <= prod_q[0] ^ prod_q[1];
    end else if (k > 1) begin : g_sum
      always_ff @(posedge clk) sum_q[k] <= sum_q[k-1] ^ prod_q[k];
    end
  end

  rb_ffa #(.N(N), .P(P)) u_ffa (
    .clk       (clk),
    .rst_n     (rst_n),
    .w_tag     (tag_pipe[P+1]),
    .w         (sum_q[P-1]),
    .out_valid (out_valid),
    .c_out     (c_out)
  );

endmodule
