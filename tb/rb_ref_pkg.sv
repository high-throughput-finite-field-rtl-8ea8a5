// rb_ref_pkg: reference arithmetic for the redundant-basis testbenches.
//
// Vectors are held in MAXN bits; only the low n bits are meaningful. The
// reference product is the cyclic convolution c_k = XOR_i a_i & b_(k-i mod n),
// computed bit by bit, independently of the structure of the RTL.
package rb_ref_pkg;

  localparam int MAXN = 512;
  typedef logic [MAXN-1:0] vec_t;

  function automatic vec_t rb_mul(input vec_t a, input vec_t b, input int n);
    vec_t c = '0;
    for (int i = 0; i < n; i++)
      if (a[i])
        for (int j = 0; j < n; j++)
          if (b[j]) c[(i + j) % n] = ~c[(i + j) % n];
    return c;
  endfunction

  // a * beta^s: bit k of the result is bit (k-s mod n) of a.
  function automatic vec_t rb_rot(input vec_t a, input int s, input int n);
    vec_t r = '0;
    for (int k = 0; k < n; k++) r[k] = a[((k - s) % n + n) % n];
    return r;
  endfunction

  function automatic vec_t rb_rand(input int n);
    vec_t r = '0;
    for (int k = 0; k < n; k++) r[k] = 1'($urandom);
    return r;
  endfunction

  // Operand number idx of a test sequence: a few special values, then random.
  function automatic vec_t rb_operand(input int idx, input int n);
    vec_t r = '0;
    case (idx)
      0: r = '0;
      1: r[0] = 1'b1;                          // beta^0, the ring's one
      2: r[n-1] = 1'b1;                        // beta^(n-1)
      3: for (int k = 0; k < n; k++) r[k] = 1'b1;
      default: r = rb_rand(n);
    endcase
    return r;
  endfunction

endpackage
