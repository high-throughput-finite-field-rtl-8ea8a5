// tb_rb_ppgu: self-checking testbench of the partial product generation unit.
//
// Three instances (N=269 D=1 SHIFT0=0, N=269 D=4 SHIFT0=100, N=7 D=3
// SHIFT0=5, where the rotations wrap past N) receive random A and b; the
// output is compared with XOR_u b[u] & rot(A, SHIFT0+u) built from the
// reference rotation, bit by bit.
module tb_rb_ppgu;
  import rb_ref_pkg::*;

  logic [268:0] a0, a1, pp0, pp1;
  logic [0:0]   b0;
  logic [3:0]   b1;
  logic [6:0]   a2, pp2;
  logic [2:0]   b2;
  int checks = 0, failures = 0;

  rb_ppgu #(.N(269), .D(1), .SHIFT0(0))   u0 (.a(a0), .b(b0), .pp(pp0));
  rb_ppgu #(.N(269), .D(4), .SHIFT0(100)) u1 (.a(a1), .b(b1), .pp(pp1));
  rb_ppgu #(.N(7),   .D(3), .SHIFT0(5))   u2 (.a(a2), .b(b2), .pp(pp2));

  function automatic vec_t ref_pp(vec_t a, int b, int d, int s0, int n);
    vec_t r = '0;
    for (int u = 0; u < d; u++) if (b[u]) r ^= rb_rot(a, s0 + u, n);
    return r;
  endfunction

  initial begin
    // Watchdog: this test is purely combinational and ends long before.
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      a0 = 269'(rb_operand(t, 269));
      a1 = 269'(rb_rand(269));
      a2 = 7'(rb_rand(7));
      b0 = 1'(t);
      b1 = 4'($urandom);
      b2 = 3'($urandom);
      #1;
      checks += 3;
      if (pp0 !== 269'(ref_pp(vec_t'(a0), int'(b0), 1, 0, 269)))   begin failures++; $display("u0 t=%0d", t); end
      if (pp1 !== 269'(ref_pp(vec_t'(a1), int'(b1), 4, 100, 269))) begin failures++; $display("u1 t=%0d", t); end
      if (pp2 !== 7'(ref_pp(vec_t'(a2), int'(b2), 3, 5, 7)))        begin failures++; $display("u2 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
