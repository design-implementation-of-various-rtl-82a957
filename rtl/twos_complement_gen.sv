// twos_complement_gen: negates a two's complement word.
//
// Every bit of the multiplicand MD is inverted and one is added with a chain of
// half adders (a ripple-carry incrementer), giving -MD modulo 2**W. Inverting
// and incrementing through a ripple chain follows the multiplier architecture
// this design implements; the width is a parameter. The most negative value
// maps to itself, so callers that need -MD for every input widen MD by one bit
// first (booth_wallace_mult does).
//
// Interface: md (W bits) in, md_neg (W bits) out. Purely combinational.
module twos_complement_gen #(
  parameter int W = 4
) (
  input  logic [W-1:0] md,
  output logic [W-1:0] md_neg
);
  logic [W-1:0] inv;
  logic [W:0]   carry;

  assign inv      = ~md;
  assign carry[0] = 1'b1;  // the "+1" of the two's complement

  for (genvar i = 0; i < W; i++) begin : g_ha
    // half adder: inv[i] + carry[i]
    assign md_neg[i]  = inv[i] ^ carry[i];
    assign carry[i+1] = inv[i] & carry[i];
  end

  // The carry out of the top bit is not part of the result.
  logic unused_carry;
  assign unused_carry = carry[W];
endmodule
