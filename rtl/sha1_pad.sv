// sha1_pad: padding of the last chunk of a message, combinational.
//
// The message bits of the last chunk (0..511 of them, left aligned, first bit in
// bit 511) are followed by a single 1 bit, then zeros, then the 64-bit message
// length in bits in the last 64 bits, so that the padded message is a multiple
// of 512 bits. When the chunk holds 448 bits or more, the length field does not
// fit behind the 1 bit and a second block (zeros, then the length) is needed:
// two_blocks is then high and blk1 holds it.
//
// The padding rule (1 bit, zeros, 64-bit length, 448 mod 512) follows the
// design; treating one final chunk combinationally is this design's choice.
//
// Interface: msg, nbits (valid bits in msg; bits below them are ignored),
// total_len in; blk0, blk1, two_blocks out. Combinational, no clock.
module sha1_pad (
  input  logic [511:0] msg,
  input  logic [8:0]   nbits,
  input  logic [63:0]  total_len,
  output logic [511:0] blk0,
  output logic [511:0] blk1,
  output logic         two_blocks
);

  logic [511:0] keep;  // ones over the valid message bits
  logic [511:0] one;   // the appended 1 bit

  always_comb begin
    keep       = ~({512{1'b1}} >> nbits);
    one        = {1'b1, 511'b0} >> nbits;
    two_blocks = (nbits >= 9'd448);
    blk0       = (msg & keep) | one;
    blk1       = {448'b0, total_len};
    if (!two_blocks) blk0[63:0] = total_len;
  end

endmodule
