// fir_tb_pkg: reference arithmetic shared by the testbenches.
//
// Everything here is worked out with plain integer arithmetic from the
// definition of the filter, not from the RTL structure:
//   term(d, x, pk) = d * x * 2^(7-pk)  (the exact digit term, LSB = 2^-7)
//   lfsr_next(s)   = one step of x^8 + x^6 + x^5 + x^4 + 1 (Fibonacci form)
package fir_tb_pkg;

  // A CSD digit setting of one DPU, in testbench form.
  typedef struct {
    int d;      // -1, 0 or +1
    int pk;     // 0..7
    bit last;   // last digit of its tap
  } digit_t;

  function automatic int term(int d, int x, int pk);
    return d * x * (1 << (7 - pk));
  endfunction

  // The 6-bit control word {cfg, zero, plus, shift[2:0]} of a digit.
  function automatic logic [5:0] ctrl_word(digit_t g);
    logic [5:0] w;
    w[5]   = g.last;
    w[4]   = (g.d == 0);
    w[3]   = (g.d == 1);
    w[2:0] = 3'(g.pk);
    return w;
  endfunction

  function automatic logic [7:0] lfsr_next(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic int sx8(logic [7:0] v);
    return int'($signed(v));
  endfunction

endpackage
