// partial_product_gen: forms the Booth partial-product rows.
//
// Row i takes 0, +MD or -MD according to the Booth select lines of multiplier
// bit i (z = non-zero, x = negate), sign-extends the chosen MD_W-bit value to
// the product width P_W and shifts it left by i. -MD comes precomputed from the
// two's complement generator. Summing all rows modulo 2**P_W gives MD times the
// two's complement multiplier. Selection by the two encoder outputs follows the
// encoding table; the row layout (full sign extension, no sign-bit tricks) is
// this design's choice.
//
// Interface: md, md_neg (MD_W bits), x, z (N lines) in; pp, N rows of P_W bits,
// out. Purely combinational.
module partial_product_gen #(
  parameter int MD_W = 5,
  parameter int N    = 5,
  parameter int P_W  = 8
) (
  input  logic [MD_W-1:0] md,
  input  logic [MD_W-1:0] md_neg,
  input  logic [N-1:0]    x,
  input  logic [N-1:0]    z,
  output logic [P_W-1:0]  pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    logic [MD_W-1:0] sel;
    logic [P_W-1:0]  ext;

    always_comb begin
      unique case ({z[i], x[i]})
        2'b10:   sel = md;      // digit +1
        2'b11:   sel = md_neg;  // digit -1
        default: sel = '0;      // digit 0
      endcase
    end

    // sign extension to the product width, then the row's weight 2**i
    if (P_W > MD_W) begin : g_ext
      assign ext = {{(P_W-MD_W){sel[MD_W-1]}}, sel};
    end else begin : g_trunc
      assign ext = sel[P_W-1:0];
    end
    assign pp[i] = ext << i;
  end
endmodule
