// rb_mult_checker: drives the operand port of one digit-serial multiplier
// with NOPS operand pairs and checks every product on its result port against
// the reference cyclic convolution, its latency against LAT (cycles from the
// cycle after the accepting edge to the out_valid cycle) and, for pairs
// issued back to back, the spacing of Q cycles between results. VARIANT only
// labels messages.
//
// GAP_PCT is the chance, in percent, that the next offer is held back for 1
// to 2Q cycles after a pair is taken, so
// the run mixes back-to-back issue, idle gaps and offers made while the
// multiplier is busy. The counters report how often each of these happened.
module rb_mult_checker
  import rb_ref_pkg::*;
#(
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
  output int   n_b2b,      // pairs accepted exactly Q cycles after the previous one
  output int   n_gap,      // pairs accepted after an idle gap
  output int   n_wait,     // cycles with in_valid high and in_ready low
  output int   n_overlap,  // pairs accepted while another was still in flight
  output logic         in_valid,
  input  logic         in_ready,
  output logic [N-1:0] a_in,
  output logic [N-1:0] b_in,
  input  logic         out_valid,
  input  logic [N-1:0] c_out
);

  vec_t exp_q [$];
  int   acc_q [$];   // cycle of each accepted, unfinished pair
  int   cyc, offered, issued, received, last_acc, last_out, last_out_acc;
  bit   took;
  int   hold;        // idle cycles left before the next offer

  initial begin
    done = 0; checks = 0; failures = 0;
    n_b2b = 0; n_gap = 0; n_wait = 0; n_overlap = 0;
    cyc = 0; offered = 0; issued = 0; received = 0;
    last_acc = -1000; last_out = -1000; last_out_acc = -1000;
    took = 0; hold = 0; in_valid = 0; a_in = '0; b_in = '0;
  end

  // Drive on the falling edge so that inputs are stable at the rising edge.
  // An offer stays unchanged until the multiplier takes it.
  always @(negedge clk) begin
    if (rst_n && (took || !in_valid)) begin
      if (took && $urandom_range(99) < GAP_PCT) hold = $urandom_range(2 * Q, 1);
      took = 0;
      if (hold > 0) begin
        hold--;
        in_valid = 1'b0;
      end else if (offered < NOPS) begin
        in_valid = 1'b1;
        a_in     = N'(rb_operand(2 * offered, N));
        b_in     = N'(rb_operand(2 * offered + 1 + (offered % 3), N));
        offered++;
      end else begin
        in_valid = 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && !in_ready) n_wait++;
      if (in_valid && in_ready) begin
        exp_q.push_back(rb_mul(vec_t'(a_in), vec_t'(b_in), N));
        if (acc_q.size() > 0) n_overlap++;
        acc_q.push_back(cyc);
        if (cyc - last_acc == Q) n_b2b++;
        else if (issued > 0)     n_gap++;
        last_acc = cyc;
        issued++;
        took = 1;
      end
      if (out_valid) begin
        vec_t exp;
        int   t_acc;
        if (exp_q.size() == 0) begin
          failures++;
          $display("V%0d: unexpected result at cycle %0d", VARIANT, cyc);
        end else begin
          exp   = exp_q.pop_front();
          t_acc = acc_q.pop_front();
          checks += 2;
          if (c_out !== exp[N-1:0]) begin
            failures++;
            $display("V%0d N=%0d P=%0d D=%0d: product %0d wrong", VARIANT, N, P, D, received);
          end
          if (cyc - t_acc - 1 != LAT) begin
            failures++;
            $display("V%0d: latency %0d, expected %0d", VARIANT, cyc - t_acc - 1, LAT);
          end
          if (t_acc - last_out_acc == Q) begin
            checks++;
            if (cyc - last_out != Q) begin
              failures++;
              $display("V%0d: results %0d cycles apart, expected %0d", VARIANT, cyc - last_out, Q);
            end
          end
          last_out     = cyc;
          last_out_acc = t_acc;
          received++;
          if (received == NOPS) done = 1'b1;
        end
      end
    end
  end

endmodule
