// sha1_schedule: SHA-1 message schedule, one word W_t per round.
//
// A 16-word window holds W_t .. W_t+15. On load it takes the 512-bit block
// (word 0 in bits 511:480), so W_0 is presented at once. Each advance shifts the
// window by one word and appends W_t+16 = ROTL1(W_t+13 ^ W_t+8 ^ W_t+2 ^ W_t),
// which is the standard expansion W_j = ROTL1(W_j-3 ^ W_j-8 ^ W_j-14 ^ W_j-16).
// For the first 16 rounds this simply presents the block's words in order.
// The expansion rule is the SHA-1 standard's; the sliding-window form is this
// design's choice.
//
// Interface: load (priority) or advance, sampled on the rising clock edge;
// w = current W_t, valid one cycle after load and after each advance. The
// window needs no reset: it is always loaded before use.
module sha1_schedule
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         load,
  input  logic [511:0] block,
  input  logic         advance,
  output word_t        w
);

  word_t win [16];
  word_t next_w;

  assign next_w = rotl(win[13] ^ win[8] ^ win[2] ^ win[0], 1);
  assign w      = win[0];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[511 - 32*i -: 32];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= next_w;
    end
  end

endmodule
