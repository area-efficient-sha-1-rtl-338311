// sha1_step: one SHA-1 round (the step function), combinational.
//
// The new A is formed by a chain of four modulo 2^32 adders in the order the
// step-function diagram draws them: E + f_t(B,C,D), then + S^5(A), then + W_t,
// then + K_t. The other words shift down: new B = A, new C = S^30(B),
// new D = C, new E = D. S^n is a left rotation by n bits. Every adder is a
// mod_add32, the design's replacement for the '+' operator.
//
// Interface: t (round 0..79), s_in (A..E), w (W_t) in; s_out (A..E after the
// round) out; wraps[i] is the carry-out flag of adder i (0 = E+f ... 3 = +K).
module sha1_step
  import sha1_pkg::*;
(
  input  logic [6:0] t,
  input  state_t     s_in,
  input  word_t      w,
  output state_t     s_out,
  output logic [3:0] wraps
);

  word_t f, k;
  word_t sum_ef, sum_a5, sum_w, sum_k;

  sha1_f u_f (.t(t), .b(s_in.b), .c(s_in.c), .d(s_in.d), .f(f));
  sha1_k u_k (.t(t), .k(k));

  mod_add32 u_add_f  (.a(s_in.e), .b(f),               .sum(sum_ef), .wrap(wraps[0]));
  mod_add32 u_add_a5 (.a(sum_ef), .b(rotl(s_in.a, 5)), .sum(sum_a5), .wrap(wraps[1]));
  mod_add32 u_add_w  (.a(sum_a5), .b(w),               .sum(sum_w),  .wrap(wraps[2]));
  mod_add32 u_add_k  (.a(sum_w),  .b(k),               .sum(sum_k),  .wrap(wraps[3]));

  always_comb begin
    s_out.a = sum_k;
    s_out.b = s_in.a;
    s_out.c = rotl(s_in.b, 30);
    s_out.d = s_in.c;
    s_out.e = s_in.d;
  end

endmodule
