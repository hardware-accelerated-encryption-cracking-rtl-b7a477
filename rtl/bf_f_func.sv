// Blowfish F function (the "F-box").
//
// The 32-bit round input is cut into four bytes a|b|c|d (a most
// significant); each byte indexes one S-box, and the four 32-bit words
// are combined as ((S0[a] + S1[b]) xor S2[c]) + S3[d], additions modulo
// 2^32.  The S-box lookups are synchronous RAM reads inside bf_core, so
// this block takes the four looked-up words and is purely combinational.
module bf_f_func
  import crack_pkg::*;
(
  input  word_t s [4],
  output word_t f
);

  always_comb f = bf_f(s[0], s[1], s[2], s[3]);

endmodule
