// shc_model_pkg: reference models used by the testbenches, written
// independently of the RTL as plain bit-serial loops.
//   spec_add  - the sum a reader would expect from a speculative
//               Han-Carlson adder: each carry out of bit i is computed only
//               from a window of operand bits (K bits ending at i for odd i,
//               K+1 bits for even i), with carry in zero.
//   exact_add - ordinary addition, carry in zero.
// Both return {carry out, sum} in the low n+1 bits.
package shc_model_pkg;

  function automatic logic [64:0] spec_add(logic [63:0] a, logic [63:0] b,
                                           int n, int k);
    logic [64:0] r = '0;
    logic [63:0] c = '0;
    for (int i = 0; i < n; i++) begin
      int  lo;
      logic g = 1'b0;
      lo = (i % 2 == 1) ? i - k + 1 : i - k;
      if (lo < 0) lo = 0;
      for (int j = lo; j <= i; j++) g = (a[j] & b[j]) | ((a[j] ^ b[j]) & g);
      c[i] = g;
    end
    for (int i = 0; i < n; i++) r[i] = a[i] ^ b[i] ^ ((i == 0) ? 1'b0 : c[i-1]);
    r[n] = c[n-1];
    return r;
  endfunction

  function automatic logic [64:0] exact_add(logic [63:0] a, logic [63:0] b, int n);
    logic [64:0] r = '0;
    logic        c = 1'b0;
    for (int i = 0; i < n; i++) begin
      r[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    r[n] = c;
    return r;
  endfunction

  // 1 when the speculative result of an n-bit adder with window k is wrong.
  function automatic logic spec_fails(logic [63:0] a, logic [63:0] b, int n, int k);
    return spec_add(a, b, n, k) != exact_add(a, b, n);
  endfunction

endpackage
