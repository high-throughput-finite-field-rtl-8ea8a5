// rb_pkg: constants and types shared by the redundant-basis (RB) multipliers.
//
// An element of GF(2^m) in redundant basis is a vector of N bits, bit k being
// the coefficient of beta^k, where beta is a primitive N-th root of unity.
// Because beta^N = 1, multiplying by beta^s is a cyclic rotation of the vector
// by s places towards the higher indices, and the product of two elements is
// the cyclic convolution c_k = XOR_i a_i & b_(k-i mod N).
//
// The digit-serial multipliers split B into Q digits of P bits and process one
// digit per clock. P = 32, Q = 9 is the first of the three (P, Q) pairs the
// design was evaluated with; N = 269 is this design's choice of ring size: it
// is the prime in the range 264 < N <= 272 that all three evaluated pairs
// (32,9), (16,17) and (8,34) allow, and 2 is primitive modulo 269, so the
// ring holds GF(2^268).
package rb_pkg;

  parameter int unsigned RB_N = 269;  // ring size (bits per operand)
  parameter int unsigned RB_P = 32;   // digit size, bits of B per cycle
  parameter int unsigned RB_Q = 9;    // digits per operand, cycles per product

  // Control that travels with every digit word through a pipeline.
  typedef struct packed {
    logic valid;  // this stage holds a digit word
    logic first;  // the word belongs to the most significant digit of B
    logic last;   // the word belongs to the least significant digit of B
  } rb_tag_t;

  localparam rb_tag_t RB_TAG_IDLE = '{valid: 1'b0, first: 1'b0, last: 1'b0};

endpackage
