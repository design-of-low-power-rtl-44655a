// Reference model for the comparator testbenches.
//
// Works on operands of up to 64 bits held in the low n bits of a 64-bit
// word. The model is written from the definition of the comparator outputs,
// not from the cell structure: it finds the most significant differing bit
// by scanning from the MSB, and derives the expected buses and decision.
package cmp_ref_pkg;

  localparam int unsigned MAXW = 64;
  typedef logic [MAXW-1:0] word_t;

  // Index of the most significant bit where a and b differ, -1 when equal.
  function automatic int first_diff(input word_t a, input word_t b, input int unsigned n);
    for (int k = int'(n) - 1; k >= 0; k--) begin
      if (a[k] != b[k]) return k;
    end
    return -1;
  endfunction

  // Expected left bus: one-hot at the first differing bit when A has the 1.
  function automatic word_t exp_left(input word_t a, input word_t b, input int unsigned n);
    int k;
    k = first_diff(a, b, n);
    if (k >= 0 && a[k]) return word_t'(1) << k;
    return '0;
  endfunction

  // Expected right bus: one-hot at the first differing bit when B has the 1.
  function automatic word_t exp_right(input word_t a, input word_t b, input int unsigned n);
    int k;
    k = first_diff(a, b, n);
    if (k >= 0 && b[k]) return word_t'(1) << k;
    return '0;
  endfunction

  // A random word with only the low n bits in use.
  function automatic word_t rand_word(input int unsigned n);
    word_t w;
    w = {$urandom, $urandom};
    if (n < MAXW) w &= (word_t'(1) << n) - 1;
    return w;
  endfunction

endpackage
