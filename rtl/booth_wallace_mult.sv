// booth_wallace_mult: Booth-encoded Wallace tree multiplier.
//
// Computes prod = md * mr for an MD_W-bit multiplicand and an MR_W-bit
// multiplier, as two's complement numbers when signed_mode = 1 and as unsigned
// numbers when signed_mode = 0. Five blocks form the datapath:
//   1. twos_complement_gen  -MD by inversion and a ripple-carry increment
//   2. booth_encoder        radix-2 recoding of every multiplier bit into the
//                           select lines x (negate) and z (non-zero)
//   3. partial_product_gen  one row per multiplier bit: 0, +MD or -MD,
//                           sign-extended and shifted to its weight
//   4. wallace_tree         3:2 compressor layers down to two rows
//   5. cla_adder            carry look-ahead addition of the two rows
// That structure and the encoding table follow the hybrid multiplier this RTL
// implements. This design's own choice is how unsigned operands are handled:
// both operands are widened by one bit, filled with the sign bit in signed
// mode and with zero in unsigned mode, so a single signed datapath serves both
// (MR_W+1 Booth rows). The product is exact in MD_W+MR_W bits in both modes.
//
// Interface: md, mr, signed_mode in; prod (MD_W+MR_W bits) out.
// Purely combinational, no clock.
module booth_wallace_mult #(
  parameter int MD_W = 4,
  parameter int MR_W = 4
) (
  input  logic                 signed_mode,
  input  logic [MD_W-1:0]      md,
  input  logic [MR_W-1:0]      mr,
  output logic [MD_W+MR_W-1:0] prod
);
  localparam int EMD = MD_W + 1;     // widened multiplicand
  localparam int EMR = MR_W + 1;     // widened multiplier = number of rows
  localparam int P_W = MD_W + MR_W;  // product width

  logic [EMD-1:0] md_e, md_neg;
  logic [EMR-1:0] mr_e, x, z;
  logic [P_W-1:0] pp [EMR];
  logic [P_W-1:0] sum_row, carry_row;
  logic           cout;

  assign md_e = {signed_mode & md[MD_W-1], md};
  assign mr_e = {signed_mode & mr[MR_W-1], mr};

  twos_complement_gen #(.W(EMD)) u_neg (
    .md    (md_e),
    .md_neg(md_neg)
  );

  booth_encoder #(.N(EMR)) u_enc (
    .mr(mr_e),
    .x (x),
    .z (z)
  );

  partial_product_gen #(.MD_W(EMD), .N(EMR), .P_W(P_W)) u_ppg (
    .md    (md_e),
    .md_neg(md_neg),
    .x     (x),
    .z     (z),
    .pp    (pp)
  );

  wallace_tree #(.N(EMR), .W(P_W)) u_tree (
    .rows     (pp),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  cla_adder #(.W(P_W)) u_cla (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .sum (prod),
    .cout(cout)
  );

  // The product is taken modulo 2**P_W, where it is exact; the carry out is
  // not part of it.
  logic unused_cout;
  assign unused_cout = cout;
endmodule
