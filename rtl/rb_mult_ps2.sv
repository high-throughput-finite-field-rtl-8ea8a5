// rb_mult_ps2: digit-serial redundant-basis multiplier, structure PS-II.
//
// Same arithmetic as PS-I (rb_mult_ps1): for each P-bit digit of B the partial
// product word W = XOR_i digit[i] & (A * beta^i) is formed and folded into the
// accumulator as C <- C*beta^P ^ W. Here the S = P/D PPGUs all work on the same
// digit at the same time and their outputs are summed by a binary XOR tree
// with a register after every level. The first level XORs two PPGU outputs,
// so its path is T_A + (1 + ceil(log2 D))*T_X; later levels are one XOR each.
// Since every PPGU sees the same A and digit, A is held only in the feeder;
// the tree holds S-1 words, the accumulator one.
//
// Timing: one product every Q cycles; log2(P/D) + Q cycles from the cycle
// the first digit leaves the feeder to the out_valid cycle (one more from
// the accepting edge). With D = P the single PPGU output is registered once,
// giving a latency of 1 + Q.
//
// Own choices of this design: P/D must be a power of two (true for every
// size the structure was evaluated at); operands enter through a valid/ready
// handshake, results leave as a one-cycle out_valid pulse.
module rb_mult_ps2
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

  localparam int unsigned S = P / D;                     // number of PPGUs
  localparam int unsigned L = (S > 1) ? $clog2(S) : 1;   // register levels

  initial begin
    assert (S * D == P && (1 << $clog2(S)) == S)
      else $error("rb_mult_ps2: P/D must be a power of two");
  end

  logic [N-1:0] a_q;
  logic [P-1:0] digit;
  rb_tag_t      tag_pipe [L+1];
  logic [N-1:0] leaf [S];
  logic [N-1:0] w;

  rb_digit_feeder #(.N(N), .P(P), .Q(Q)) u_feeder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .a_in     (a_in),
    .b_in     (b_in),
    .a_q      (a_q),
    .digit    (digit),
    .tag      (tag_pipe[0])
  );

  for (genvar k = 0; k < S; k++) begin : g_ppgu
    rb_ppgu #(.N(N), .D(D), .SHIFT0(k * D)) u_ppgu (
      .a  (a_q),
      .b  (digit[k*D +: D]),
      .pp (leaf[k])
    );
  end

  for (genvar l = 0; l < L; l++) begin : g_tag
    always_ff @(posedge clk) begin
      if (!rst_n) tag_pipe[l+1] <= RB_TAG_IDLE;
      else        tag_pipe[l+1] <= tag_pipe[l];
    end
  end

  if (S == 1) begin : g_single
    logic [N-1:0] w_q;
    always_ff @(posedge clk) w_q <= leaf[0];
    assign w = w_q;
  end else begin : g_tree
    // Heap order: node k has children 2k+1 and 2k+2; nodes S-1 .. 2S-2 are
    // the PPGU outputs, nodes 0 .. S-2 are registers.
    logic [N-1:0] node_q [S-1];
    for (genvar k = 0; k < S - 1; k++) begin : g_node
      logic [N-1:0] lhs, rhs;
      if (2*k + 1 >= S - 1) begin : g_leafs
        assign lhs = leaf[2*k + 1 - (S - 1)];
        assign rhs = leaf[2*k + 2 - (S - 1)];
      end else begin : g_inner
        assign lhs = node_q[2*k + 1];
        assign rhs = node_q[2*k + 2];
      end
      always_ff @(posedge clk) node_q[k] <= lhs ^ rhs;
    end
    assign w = node_q[0];
  end

  rb_ffa #(.N(N), .P(P)) u_ffa (
    .clk       (clk),
    .rst_n     (rst_n),
    .w_tag     (tag_pipe[L]),
    .w         (w),
    .out_valid (out_valid),
    .c_out     (c_out)
  );

endmodule
