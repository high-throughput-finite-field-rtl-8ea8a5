// tb_rb_workloads: runs every configuration the structures were evaluated at,
// on the ring N = 269: (P,Q) = (32,9) with PS-I and PS-II at d = 1, 2, 4, 8;
// (16,17) with d = 1, 2, 4; (8,34) with d = 1, 2; and PS-III at each (P,Q).
// Each configuration multiplies 8 operand pairs; products are compared with
// the reference cyclic convolution, latencies with P/d+Q (PS-I),
// log2(P/d)+Q (PS-II) and P+Q+1 (PS-III), and back-to-back results must
// come Q cycles apart.
module tb_rb_workloads;
  localparam bit REQ_MECH = 0;
  localparam int NCFG = 21;
  // Configuration i as {structure, P, Q, d}, field f = 0..3.
  function automatic int cfg(int i, int f);
    int t [4];
    case (i)
      0: t = '{1, 32,  9, 1};   1: t = '{1, 32,  9, 2};   2: t = '{1, 32,  9, 4};
      3: t = '{1, 32,  9, 8};   4: t = '{2, 32,  9, 1};   5: t = '{2, 32,  9, 2};
      6: t = '{2, 32,  9, 4};   7: t = '{2, 32,  9, 8};   8: t = '{3, 32,  9, 1};
      9: t = '{1, 16, 17, 1};  10: t = '{1, 16, 17, 2};  11: t = '{1, 16, 17, 4};
     12: t = '{2, 16, 17, 1};  13: t = '{2, 16, 17, 2};  14: t = '{2, 16, 17, 4};
     15: t = '{3, 16, 17, 1};  16: t = '{1,  8, 34, 1};  17: t = '{1,  8, 34, 2};
     18: t = '{2,  8, 34, 1};  19: t = '{2,  8, 34, 2};
     default: t = '{3,  8, 34, 1};
    endcase
    return t[f];
  endfunction

  function automatic int lat(int v, int p, int q, int d);
    if (v == 1) return p / d + q;
    if (v == 2) return (p / d > 1 ? $clog2(p / d) : 1) + q;
    return p + q + 1;
  endfunction

  logic clk = 0, rst_n = 0;
  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], b2b [NCFG], gap [NCFG], wt [NCFG], ovl [NCFG];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int V = cfg(i, 0), P = cfg(i, 1), Q = cfg(i, 2), D = cfg(i, 3);
    rb_mult_harness #(.VARIANT(V), .N(269), .P(P), .Q(Q), .D(D), .LAT(lat(V, P, Q, D)), .NOPS(8)) h (
      .clk, .rst_n, .done(done[i]), .checks(checks[i]), .failures(failures[i]),
      .n_b2b(b2b[i]), .n_gap(gap[i]), .n_wait(wt[i]), .n_overlap(ovl[i]));
  end

  `include "tb_mult_common.svh"

  initial begin
    wait (report_ready);
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_fail);
    $finish;
  end
endmodule
