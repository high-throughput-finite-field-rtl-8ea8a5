// tb_rb_mult_ps3: self-checking testbench of PS-III.
//
// Runs the full-size configuration (N=269, P=32, Q=9), the evaluated pair
// P=16, Q=17, and a small ring N=5 with (P,Q) = (2,3) and (4,2), where digits
// and padding wrap differently. Each product is compared with the reference
// cyclic convolution; latency must be P + Q + 1 cycles after the operand register,
// and back-to-back pairs must give results Q cycles apart.
module tb_rb_mult_ps3;
  localparam bit REQ_MECH = 1;
  localparam int NCFG = 4;
  logic clk = 0, rst_n = 0;
  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], b2b [NCFG], gap [NCFG], wt [NCFG], ovl [NCFG];

  always #5 clk = ~clk;

  rb_mult_harness #(.VARIANT(3), .N(269), .P(32), .Q(9), .LAT(32 + 9 + 1), .NOPS(24)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_b2b(b2b[0]), .n_gap(gap[0]), .n_wait(wt[0]), .n_overlap(ovl[0]));
  rb_mult_harness #(.VARIANT(3), .N(269), .P(16), .Q(17), .LAT(16 + 17 + 1), .NOPS(24)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_b2b(b2b[1]), .n_gap(gap[1]), .n_wait(wt[1]), .n_overlap(ovl[1]));
  rb_mult_harness #(.VARIANT(3), .N(5), .P(2), .Q(3), .LAT(2 + 3 + 1), .NOPS(40)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_b2b(b2b[2]), .n_gap(gap[2]), .n_wait(wt[2]), .n_overlap(ovl[2]));
  rb_mult_harness #(.VARIANT(3), .N(5), .P(4), .Q(2), .LAT(4 + 2 + 1), .NOPS(40)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_b2b(b2b[3]), .n_gap(gap[3]), .n_wait(wt[3]), .n_overlap(ovl[3]));

  `include "tb_mult_common.svh"

  initial begin
    wait (report_ready);
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fail);
    $finish;
  end
endmodule
