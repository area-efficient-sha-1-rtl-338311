// sha1_core: iterative SHA-1 compression engine, one round per clock.
//
// Holds the 160-bit chaining value H0..H4 and the working registers A..E. A
// block is accepted with start while ready is high: the message schedule takes
// the block and A..E take H0..H4 (or, with init, both take the standard initial
// values, starting a new message). Then 80 clocks each apply one step function
// (sha1_step) with W_t from sha1_schedule; one more clock adds A..E into
// H0..H4 with modulo 2^32 adders, and done pulses for one cycle while digest
// shows the updated H0..H4. The 80 rounds, the step function, the constants and
// the initial values follow the design; the final addition into H0..H4 is the
// SHA-1 standard's; the one-round-per-clock schedule and the handshake are
// this design's own.
//
// Timing: start sampled on edge 0; rounds on edges 1..80; H updated on edge 81,
// after which done is high for one cycle and ready is high again. A block thus
// takes 81 cycles from the accepting edge to done, 82 to the next accept.
// wrap_count counts the modulo reductions made by the four round adders during
// the last block, for observation. Reset is asynchronous and active low.
module sha1_core
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         start,
  input  logic [511:0] block,
  output logic         ready,
  output logic         done,
  output logic [159:0] digest,
  output logic [15:0]  wrap_count
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} fsm_t;

  fsm_t       fsm;
  logic [6:0] t;
  state_t     h, s, s_next;
  state_t     h_sum;
  word_t      w;
  logic [3:0] wraps;
  logic [4:0] unused_final_wraps;
  logic       accept;

  assign accept = start && (fsm == S_IDLE);
  assign ready  = (fsm == S_IDLE);
  assign digest = h;

  sha1_schedule u_sched (
    .clk    (clk),
    .load   (accept),
    .block  (block),
    .advance(fsm == S_ROUND),
    .w      (w)
  );

  sha1_step u_step (.t(t), .s_in(s), .w(w), .s_out(s_next), .wraps(wraps));

  // Final addition of the working state into the chaining value.
  mod_add32 u_fa (.a(h.a), .b(s.a), .sum(h_sum.a), .wrap(unused_final_wraps[0]));
  mod_add32 u_fb (.a(h.b), .b(s.b), .sum(h_sum.b), .wrap(unused_final_wraps[1]));
  mod_add32 u_fc (.a(h.c), .b(s.c), .sum(h_sum.c), .wrap(unused_final_wraps[2]));
  mod_add32 u_fd (.a(h.d), .b(s.d), .sum(h_sum.d), .wrap(unused_final_wraps[3]));
  mod_add32 u_fe (.a(h.e), .b(s.e), .sum(h_sum.e), .wrap(unused_final_wraps[4]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm        <= S_IDLE;
      t          <= '0;
      h          <= STATE_INIT;
      s          <= STATE_INIT;
      done       <= 1'b0;
      wrap_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (fsm)
        S_IDLE: begin
          if (start) begin
            s          <= init ? STATE_INIT : h;
            if (init) h <= STATE_INIT;
            t          <= '0;
            wrap_count <= '0;
            fsm        <= S_ROUND;
          end
        end
        S_ROUND: begin
          s          <= s_next;
          wrap_count <= wrap_count + 16'(wraps[0]) + 16'(wraps[1])
                                   + 16'(wraps[2]) + 16'(wraps[3]);
          t          <= t + 7'd1;
          if (t == 7'(ROUNDS_C - 1)) fsm <= S_FINAL;
        end
        S_FINAL: begin
          h    <= h_sum;
          done <= 1'b1;
          fsm  <= S_IDLE;
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

endmodule
