// tb_rb_multipliers: end-to-end testbench of the top level at its default
// sizes (N=269, P=32, Q=9, D1=D2=1).
//
// Each of the three structures receives its own stream of 30 operand pairs,
// mixing back-to-back issue, idle gaps and offers made while the structure
// is busy. Every product is compared with the reference cyclic convolution,
// latencies must be P+Q (PS-I), log2(P)+Q (PS-II) and P+Q+1 (PS-III) cycles
// after the operand register, and back-to-back pairs must yield results Q
// cycles apart. Each of those mechanisms must have occurred at least once.
module tb_rb_multipliers;
  import rb_pkg::*;

  localparam bit REQ_MECH = 1;
  localparam int NCFG = 3;
  localparam int N = RB_N, P = RB_P, Q = RB_Q;

  logic clk = 0, rst_n = 0;
  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], b2b [NCFG], gap [NCFG], wt [NCFG], ovl [NCFG];

  logic         in_valid [NCFG], in_ready [NCFG], out_valid [NCFG];
  logic [N-1:0] a [NCFG], b [NCFG], c [NCFG];

  always #5 clk = ~clk;

  rb_multipliers dut (
    .clk, .rst_n,
    .ps1_in_valid (in_valid[0]), .ps1_in_ready (in_ready[0]), .ps1_a (a[0]), .ps1_b (b[0]),
    .ps1_out_valid (out_valid[0]), .ps1_c (c[0]),
    .ps2_in_valid (in_valid[1]), .ps2_in_ready (in_ready[1]), .ps2_a (a[1]), .ps2_b (b[1]),
    .ps2_out_valid (out_valid[1]), .ps2_c (c[1]),
    .ps3_in_valid (in_valid[2]), .ps3_in_ready (in_ready[2]), .ps3_a (a[2]), .ps3_b (b[2]),
    .ps3_out_valid (out_valid[2]), .ps3_c (c[2])
  );

  localparam int LAT [NCFG] = '{P + Q, $clog2(P) + Q, P + Q + 1};

  for (genvar i = 0; i < NCFG; i++) begin : g_chk
    rb_mult_checker #(.VARIANT(i + 1), .N(N), .P(P), .Q(Q), .LAT(LAT[i]), .NOPS(30)) chk (
      .clk, .rst_n, .done(done[i]), .checks(checks[i]), .failures(failures[i]),
      .n_b2b(b2b[i]), .n_gap(gap[i]), .n_wait(wt[i]), .n_overlap(ovl[i]),
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .a_in(a[i]), .b_in(b[i]),
      .out_valid(out_valid[i]), .c_out(c[i]));
  end

  `include "tb_mult_common.svh"

  initial begin
    wait (report_ready);
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fail);
    $finish;
  end
endmodule
