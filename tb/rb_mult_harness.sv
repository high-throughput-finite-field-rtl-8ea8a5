// rb_mult_harness: one digit-serial multiplier (PS-I, PS-II or PS-III, chosen
// by VARIANT) connected to an rb_mult_checker that drives it with NOPS operand
// pairs and checks products, latency LAT and the Q-cycle result spacing.
module rb_mult_harness #(
  parameter int VARIANT = 1,
  parameter int N       = 269,
  parameter int P       = 32,
  parameter int Q       = 9,
  parameter int D       = 1,
  parameter int LAT     = 41,
  parameter int NOPS    = 20,
  parameter int GAP_PCT = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_b2b,
  output int   n_gap,
  output int   n_wait,
  output int   n_overlap
);

  logic         in_valid, in_ready, out_valid;
  logic [N-1:0] a_in, b_in, c_out;

  if (VARIANT == 1) begin : g_ps1
    rb_mult_ps1 #(.N(N), .P(P), .Q(Q), .D(D)) dut (.*);
  end else if (VARIANT == 2) begin : g_ps2
    rb_mult_ps2 #(.N(N), .P(P), .Q(Q), .D(D)) dut (.*);
  end else begin : g_ps3
    rb_mult_ps3 #(.N(N), .P(P), .Q(Q)) dut (.*);
  end

  rb_mult_checker #(.VARIANT(VARIANT), .N(N), .P(P), .Q(Q), .D(D), .LAT(LAT),
                    .NOPS(NOPS), .GAP_PCT(GAP_PCT)) chk (.*);

endmodule
