// mod_add32: modulo 2^WIDTH adder built the way the design proposes.
//
// Instead of relying on the truncation of a plain '+', the two words are added
// into a temporary one bit wider than the operands, 2^WIDTH is subtracted from
// that temporary, and the difference is taken as the result when it is not
// negative; otherwise the temporary itself is the result. The outcome equals
// (a + b) mod 2^WIDTH. The comparison is made on the sign (borrow) bit of the
// difference, which is this design's reading of the selection rule.
//
// Interface: a, b in; sum out; wrap is high when the 2^WIDTH reduction was
// applied (the carry out of the plain addition), an extra output used for
// observation. Purely combinational, no clock.
module mod_add32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             wrap
);

  logic [WIDTH:0]   temp;  // unreduced sum
  logic [WIDTH+1:0] diff;  // temp - 2^WIDTH, sign in the top bit

  always_comb begin
    temp = {1'b0, a} + {1'b0, b};
    diff = {1'b0, temp} - {2'b01, {WIDTH{1'b0}}};
    wrap = ~diff[WIDTH+1];
    sum  = wrap ? diff[WIDTH-1:0] : temp[WIDTH-1:0];
  end

endmodule
