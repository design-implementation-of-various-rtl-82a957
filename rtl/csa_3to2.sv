// csa_3to2: a row of full adders used as a 3:2 compressor (carry-save adder).
//
// Three W-bit rows a, b, c are compressed into a sum row and a carry row with
// a + b + c == sum + carry (mod 2**W). Each bit position is one full adder; the
// carry row is the majority of the three inputs shifted one place left, so
// nothing propagates across bit positions. Building block of the Wallace tree.
//
// Interface: a, b, c in; sum, carry out (all W bits). Purely combinational.
module csa_3to2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};

  // The carry out of the top position falls outside the modulo-2**W result.
  logic unused_top;
  assign unused_top = maj[W-1];
endmodule
