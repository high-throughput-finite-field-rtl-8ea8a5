// tb_rb_ffa: self-checking testbench of the finite field accumulator.
//
// Feeds sequences of Q random words W_(Q-1) .. W_0 (first word tagged first,
// last word tagged last), with random idle cycles in between and sometimes
// back to back, and compares the result with sum_j rot(W_j, jP) built from
// the reference rotation. out_valid must be high exactly one cycle after the
// last word and at no other time.
module tb_rb_ffa;
  import rb_ref_pkg::*;
  import rb_pkg::*;

  localparam int N = 269, P = 32, Q = 9;

  logic clk = 0, rst_n = 0;
  rb_tag_t      w_tag;
  logic [N-1:0] w, c_out;
  logic         out_valid;
  int checks = 0, failures = 0;
  vec_t expect_c;

  always #5 clk = ~clk;

  rb_ffa #(.N(N), .P(P)) dut (.*);

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    w_tag = RB_TAG_IDLE; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 40; op++) begin
      expect_c = '0;
      for (int j = Q - 1; j >= 0; j--) begin
        vec_t wj;
        wj = rb_rand(N);
        expect_c ^= rb_rot(wj, j * P, N);
        w_tag = '{valid: 1'b1, first: (j == Q - 1), last: (j == 0)};
        w = N'(wj);
        @(negedge clk);
        checks++;
        if (out_valid !== (j == 0)) begin failures++; $display("out_valid wrong op %0d digit %0d", op, j); end
      end
      checks++;
      if (c_out !== N'(expect_c)) begin failures++; $display("product %0d wrong", op); end
      // Idle cycles with garbage data must not disturb anything.
      w_tag = RB_TAG_IDLE;
      w = N'(rb_rand(N));
      if (op % 2 == 1) begin
        repeat ($urandom_range(3, 1)) begin
          @(negedge clk);
          checks++;
          if (out_valid !== 1'b0 || c_out !== N'(expect_c)) begin failures++; $display("idle disturbed op %0d", op); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
