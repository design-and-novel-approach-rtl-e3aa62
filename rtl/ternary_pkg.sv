// ternary_pkg: shared definitions for the ternary (radix-3) decoder and encoder.
//
// Ternary logic has three levels: 0 (low), 1 (middle) and 2 (high). On binary
// signals each ternary digit ("trit") is carried as a 2-bit unsigned code,
// 2'd0, 2'd1 or 2'd2; the code 2'd3 is illegal and is never produced by the
// blocks of this design. This binary carrier is a choice of this design: the
// three levels are those of ternary logic, the 2-bit code is not.
//
// A number of N trits is a packed vector trit_t [N-1:0]; element N-1 is the
// most significant digit, so for N = 2 the pair (a, b) is {a, b} and has the
// value 3*a + b.
package ternary_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t TRIT_LOW  = 2'd0;
  localparam trit_t TRIT_MID  = 2'd1;
  localparam trit_t TRIT_HIGH = 2'd2;

  // 3**n, for sizing the 3**N output lines of an N-trit decoder.
  function automatic int unsigned pow3(input int unsigned n);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < n; i++) r = r * 3;
    return r;
  endfunction

  // Trit k (0 = least significant) of the number v written in radix 3.
  function automatic trit_t trit_of(input int unsigned v, input int unsigned k);
    int unsigned q;
    q = v;
    for (int unsigned i = 0; i < k; i++) q = q / 3;
    return trit_t'(q % 3);
  endfunction

endpackage
