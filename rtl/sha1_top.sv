// sha1_top: complete SHA-1 hasher for messages of any bit length.
//
// A message enters as a sequence of 512-bit chunks on a valid/ready handshake,
// first message bit in bit 511. Full chunks are sent with in_last low; the last
// chunk carries 0..511 valid bits (in_nbits) with in_last high, so a message
// whose length is a multiple of 512 ends with an empty last chunk. The top keeps
// the running bit length, pads the last chunk with sha1_pad (1 bit, zeros,
// 64-bit length) and feeds the blocks to sha1_core; when the padding spills
// into a second block that block is issued as soon as the core is free. When
// the core finishes the final block, digest_valid pulses for one cycle with the
// 160-bit hash on digest (H0 in bits 159:128); digest holds its value until the
// next block completes. The first chunk of each message restarts the core from
// the initial values. Chunking, padding and chaining follow the design; the
// interface is this design's own.
//
// Timing: each block occupies the core for 82 cycles (accept to next accept);
// in_ready is low while a block is in the core or a second padding block waits.
module sha1_top (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] in_data,
  input  logic         in_last,
  input  logic [8:0]   in_nbits,
  output logic         digest_valid,
  output logic [159:0] digest
);

  logic [63:0]  len;        // bits of the current message accepted so far
  logic         first;      // next chunk begins a message
  logic         busy;       // a block is in the core
  logic         pend2;      // the second padding block waits
  logic         cur_final;  // the block in the core ends the message
  logic [511:0] blk2_q;

  logic [63:0]  total_len;
  logic [511:0] pad0, pad1;
  logic         two_blocks;

  logic         accept, issue2, core_start, core_ready, core_done;
  logic [511:0] core_block;
  logic [15:0]  unused_wrap_count;

  assign total_len = len + 64'(in_nbits);

  sha1_pad u_pad (
    .msg       (in_data),
    .nbits     (in_nbits),
    .total_len (total_len),
    .blk0      (pad0),
    .blk1      (pad1),
    .two_blocks(two_blocks)
  );

  assign in_ready   = !busy && !pend2 && core_ready;
  assign accept     = in_valid && in_ready;
  assign issue2     = pend2 && !busy && core_ready;
  assign core_start = accept || issue2;
  assign core_block = issue2 ? blk2_q : (in_last ? pad0 : in_data);

  sha1_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (accept && first),
    .start     (core_start),
    .block     (core_block),
    .ready     (core_ready),
    .done      (core_done),
    .digest    (digest),
    .wrap_count(unused_wrap_count)
  );

  assign digest_valid = core_done && cur_final;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len       <= '0;
      first     <= 1'b1;
      busy      <= 1'b0;
      pend2     <= 1'b0;
      cur_final <= 1'b0;
      blk2_q    <= '0;
    end else begin
      if (core_done) busy <= 1'b0;
      if (accept) begin
        busy <= 1'b1;
        if (in_last) begin
          len       <= '0;
          first     <= 1'b1;
          pend2     <= two_blocks;
          blk2_q    <= pad1;
          cur_final <= !two_blocks;
        end else begin
          len       <= len + 64'd512;
          first     <= 1'b0;
          cur_final <= 1'b0;
        end
      end else if (issue2) begin
        busy      <= 1'b1;
        pend2     <= 1'b0;
        cur_final <= 1'b1;
      end
    end
  end

  // The core only ever finishes a block this module issued to it.
  a_done_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                          core_done |-> busy);

endmodule
