// sha1_pkg: types and constants shared by the SHA-1 modules.
//
// Holds the 32-bit word type, the five-word working state (A..E) as a packed
// struct, the initial chaining values, the four round constants K_t and the
// round count. The initial values and constants are those of the SHA-1
// standard (FIPS 180). The initial value of E is 0xc3d2e1f0.
package sha1_pkg;

  typedef logic [31:0] word_t;

  // Working registers A..E of the step function; A is the most significant word.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } state_t;

  localparam int unsigned ROUNDS_C = 80;

  localparam word_t H0_INIT = 32'h67452301;
  localparam word_t H1_INIT = 32'hefcdab89;
  localparam word_t H2_INIT = 32'h98badcfe;
  localparam word_t H3_INIT = 32'h10325476;
  localparam word_t H4_INIT = 32'hc3d2e1f0;

  localparam state_t STATE_INIT = '{a: H0_INIT, b: H1_INIT, c: H2_INIT,
                                    d: H3_INIT, e: H4_INIT};

  localparam word_t K0 = 32'h5a827999;  // rounds  0..19
  localparam word_t K1 = 32'h6ed9eba1;  // rounds 20..39
  localparam word_t K2 = 32'h8f1bbcdc;  // rounds 40..59
  localparam word_t K3 = 32'hca62c1d6;  // rounds 60..79

  // Left circular rotation of a word (the S^n operator).
  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

endpackage
