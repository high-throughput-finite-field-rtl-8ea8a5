// rb_ppgu: partial product generation unit (PPGU) of a redundant-basis
// multiplier.
//
// For D bits b[0..D-1] of operand B, whose bit u carries the weight
// beta^(SHIFT0+u), the unit forms
//     pp = XOR_u  b[u] & (A * beta^(SHIFT0+u)).
// Multiplication by beta^s is a fixed cyclic rotation of A, so the unit is one
// row of N AND gates per bit of b followed by a balanced XOR tree of depth
// ceil(log2 D): its delay is T_A + ceil(log2 D)*T_X. The unit is purely
// combinational; each multiplier structure places its own registers around it.
// With D = 1 it is the single AND row (n AND gates) of the basic PPGU; larger D
// is the "digit size d" variant of the structures. The AND rows and the delay
// follow the original structures; keeping the XOR with the incoming partial
// sum outside the unit, so that one unit serves the chain and the tree, and
// the balanced shape of the internal tree are this design's choices.
//
// Interface: a (N bits), b (D bits), SHIFT0 (rotation of bit b[0]); output pp.
module rb_ppgu #(
  parameter int unsigned N      = 269,
  parameter int unsigned D      = 1,
  parameter int unsigned SHIFT0 = 0
) (
  input  logic [N-1:0] a,
  input  logic [D-1:0] b,
  output logic [N-1:0] pp
);

  // Leaves of the XOR tree: one gated, rotated copy of A per bit of b.
  localparam int unsigned LEAVES = 1 << $clog2(D);
  logic [N-1:0] node [2*LEAVES-1];

  for (genvar u = 0; u < LEAVES; u++) begin : g_leaf
    if (u < D) begin : g_and
      localparam int unsigned S = (SHIFT0 + u) % N;
      logic [N-1:0] rot;
      if (S == 0) begin : g_s0
        assign rot = a;
      end else begin : g_sn
        assign rot = {a[N-1-S:0], a[N-1:N-S]};
      end
      assign node[LEAVES-1+u] = rot & {N{b[u]}};
    end else begin : g_pad
      assign node[LEAVES-1+u] = '0;
    end
  end

  // Heap-ordered XOR tree: node k = node 2k+1 ^ node 2k+2.
  for (genvar k = 0; k < LEAVES - 1; k++) begin : g_xor
    assign node[k] = node[2*k+1] ^ node[2*k+2];
  end

  assign pp = node[0];

endmodule
