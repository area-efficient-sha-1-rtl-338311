// sha1_f: the round-dependent non-linear function f_t(B, C, D) of SHA-1.
//
// Rounds  0..19: (B and C) xor (not B and D)           (choose)
// Rounds 20..39: B xor C xor D                          (parity)
// Rounds 40..59: (B and C) or (B and D) or (C and D)    (majority)
// Rounds 60..79: B xor C xor D                          (parity)
// The function table follows the design; the majority term (B and C) is the
// standard SHA-1 one. Inputs t (round number, 0..79) and the words B, C, D;
// output f. Combinational.
module sha1_f
  import sha1_pkg::*;
(
  input  logic [6:0] t,
  input  word_t      b,
  input  word_t      c,
  input  word_t      d,
  output word_t      f
);

  always_comb begin
    if (t < 7'd20)      f = (b & c) ^ (~b & d);
    else if (t < 7'd40) f = b ^ c ^ d;
    else if (t < 7'd60) f = (b & c) | (b & d) | (c & d);
    else                f = b ^ c ^ d;
  end

endmodule
