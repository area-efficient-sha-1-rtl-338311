// sha1_k: round constant K_t of SHA-1.
//
// Four constants, each used for 20 consecutive rounds: 0x5a827999 (0..19),
// 0x6ed9eba1 (20..39), 0x8f1bbcdc (40..59), 0xca62c1d6 (60..79). Round
// numbers beyond 79 (never used) give the last constant; that choice is this
// design's, the four values and their ranges follow the design. Combinational.
module sha1_k
  import sha1_pkg::*;
(
  input  logic [6:0] t,
  output word_t      k
);

  always_comb begin
    if (t < 7'd20)      k = K0;
    else if (t < 7'd40) k = K1;
    else if (t < 7'd60) k = K2;
    else                k = K3;
  end

endmodule
