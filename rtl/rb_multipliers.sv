// rb_multipliers: the three digit-serial redundant-basis multipliers side by
// side.
//
// Each structure multiplies two N-bit redundant-basis elements (N = 269, ring
// GF(2)[beta]/(beta^269 - 1), which holds GF(2^268)), consuming B one P-bit
// digit per cycle over Q = 9 cycles and delivering one product every Q cycles:
//   PS-I   (ps1_*): systolic chain of P/D1 PPGUs; period T_A+(1+log2 D1)T_X,
//                   latency P/D1 + Q;
//   PS-II  (ps2_*): P/D2 PPGUs and a pipelined XOR tree; same period,
//                   latency log2(P/D2) + Q;
//   PS-III (ps3_*): product and sum registers in every stage; period T_X,
//                   latency P + Q + 1.
// The structures trade area, clock rate and power differently and an
// application would pick one. Placing all three side by side, sharing only
// clock and reset, each with its own valid/ready operand port and
// out_valid/c_out result port, is this design's arrangement. Latencies count
// from the cycle the first digit leaves the operand register, one cycle after
// the accepting edge.
module rb_multipliers
  import rb_pkg::*;
#(
  parameter int unsigned N  = RB_N,
  parameter int unsigned P  = RB_P,
  parameter int unsigned Q  = RB_Q,
  parameter int unsigned D1 = 1,
  parameter int unsigned D2 = 1
) (
  input  logic         clk,
  input  logic         rst_n,

  input  logic         ps1_in_valid,
  output logic         ps1_in_ready,
  input  logic [N-1:0] ps1_a,
  input  logic [N-1:0] ps1_b,
  output logic         ps1_out_valid,
  output logic [N-1:0] ps1_c,

  input  logic         ps2_in_valid,
  output logic         ps2_in_ready,
  input  logic [N-1:0] ps2_a,
  input  logic [N-1:0] ps2_b,
  output logic         ps2_out_valid,
  output logic [N-1:0] ps2_c,

  input  logic         ps3_in_valid,
  output logic         ps3_in_ready,
  input  logic [N-1:0] ps3_a,
  input  logic [N-1:0] ps3_b,
  output logic         ps3_out_valid,
  output logic [N-1:0] ps3_c
);

  rb_mult_ps1 #(.N(N), .P(P), .Q(Q), .D(D1)) u_ps1 (
    .clk, .rst_n,
    .in_valid (ps1_in_valid), .in_ready (ps1_in_ready),
    .a_in (ps1_a), .b_in (ps1_b),
    .out_valid (ps1_out_valid), .c_out (ps1_c)
  );

  rb_mult_ps2 #(.N(N), .P(P), .Q(Q), .D(D2)) u_ps2 (
    .clk, .rst_n,
    .in_valid (ps2_in_valid), .in_ready (ps2_in_ready),
    .a_in (ps2_a), .b_in (ps2_b),
    .out_valid (ps2_out_valid), .c_out (ps2_c)
  );

  rb_mult_ps3 #(.N(N), .P(P), .Q(Q)) u_ps3 (
    .clk, .rst_n,
    .in_valid (ps3_in_valid), .in_ready (ps3_in_ready),
    .a_in (ps3_a), .b_in (ps3_b),
    .out_valid (ps3_out_valid), .c_out (ps3_c)
  );

endmodule
