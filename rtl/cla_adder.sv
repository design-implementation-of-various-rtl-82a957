// cla_adder: W-bit carry look-ahead adder, the final adder of the multiplier.
//
// The operands are split into 4-bit slices (zero-padded at the top when W is
// not a multiple of four). Inside a slice all carries come from look-ahead
// equations (cla4); the slice carries are chained from one slice to the next.
// The multiplier only needs "a carry look-ahead adder"; the 4-bit slicing is
// this design's choice.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out, with
// {cout, sum} == a + b + cin. Purely combinational.
module cla_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NB = (W + 3) / 4;  // number of 4-bit slices
  localparam int WP = 4 * NB;       // padded width

  logic [WP-1:0] a_p, b_p, s_p;
  logic [NB:0]   c;

  assign a_p  = WP'(a);
  assign b_p  = WP'(b);
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_slice
    cla4 u_cla4 (
      .a   (a_p[4*i +: 4]),
      .b   (b_p[4*i +: 4]),
      .cin (c[i]),
      .sum (s_p[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  assign sum = s_p[W-1:0];
  if (WP == W) begin : g_exact
    assign cout = c[NB];
  end else begin : g_padded
    // the carry out of bit W-1 lands in the first padding bit
    assign cout = s_p[W];
    logic unused_pad;
    assign unused_pad = ^{c[NB], s_p[WP-1:W]};
  end
endmodule
