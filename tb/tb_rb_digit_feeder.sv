// tb_rb_digit_feeder: self-checking testbench of the operand register and
// digit feeder (N=269, P=32, Q=9).
//
// Offers random operand pairs with random gaps. After each accepting edge
// the next Q cycles must show A unchanged and digit j = Q-1 .. 0 of B
// (B padded with zeros to P*Q bits), tagged first on j = Q-1 and last on
// j = 0; in_ready must be low during the first Q-1 of those cycles and high
// on the last one and whenever the feeder is idle.
module tb_rb_digit_feeder;
  import rb_ref_pkg::*;
  import rb_pkg::*;

  localparam int N = 269, P = 32, Q = 9;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [N-1:0] a_in, b_in, a_q;
  logic [P-1:0] digit;
  rb_tag_t      tag;
  int checks = 0, failures = 0, b2b = 0;

  always #5 clk = ~clk;

  rb_digit_feeder #(.N(N), .P(P), .Q(Q)) dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [P*Q-1:0] bpad;
    logic [N-1:0]   a_exp;
    in_valid = 0; a_in = '0; b_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (tag.valid !== 1'b0 || in_ready !== 1'b1) begin failures++; $display("not idle after reset"); end
    for (int op = 0; op < 30; op++) begin
      a_in = N'(rb_rand(N));
      b_in = N'(rb_operand(op, N));
      in_valid = 1;
      checks++;
      if (in_ready !== 1'b1) begin failures++; $display("not ready for op %0d", op); end
      a_exp = a_in;
      bpad  = (P*Q)'(b_in);
      @(negedge clk);   // accepted at the edge just passed
      in_valid = 0;
      a_in = N'(rb_rand(N)); b_in = N'(rb_rand(N));
      for (int k = 0; k < Q; k++) begin
        int j;
        j = Q - 1 - k;
        checks += 4;
        if (a_q !== a_exp) begin failures++; $display("A not held, op %0d k %0d", op, k); end
        if (digit !== bpad[j*P +: P]) begin failures++; $display("digit %0d wrong, op %0d", j, op); end
        if (tag !== '{valid: 1'b1, first: (k == 0), last: (k == Q - 1)}) begin failures++; $display("tag wrong op %0d k %0d", op, k); end
        if (in_ready !== (k == Q - 1)) begin failures++; $display("in_ready wrong op %0d k %0d", op, k); end
        // Offer the next pair before the last digit only half of the time.
        if (k == Q - 1 && op % 2 == 0) break;
        if (k < Q - 1) begin
          // A pair offered while busy must be ignored.
          in_valid = (k == 2);
          @(negedge clk);
          in_valid = 0;
        end else begin
          @(negedge clk);
          checks++;
          if (tag.valid !== 1'b0) begin failures++; $display("still busy op %0d", op); end
        end
      end
      if (op % 2 == 0) b2b++;
    end
    $display("back-to-back pairs: %0d", b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
