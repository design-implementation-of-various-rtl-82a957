// booth_encoder: radix-2 Booth recoding of the multiplier operand.
//
// Each multiplier bit MR[i] is paired with its right neighbour MR[i-1]
// (MR[-1] = 0) and recoded to a digit in {-1, 0, +1}. The digit is carried as
// two select lines, following the encoding table of the multiplier:
//
//   MR[i] MR[i-1] | digit | x (negate) | z (non-zero) | partial product
//     0     0     |   0   |     0      |      0       | 0
//     0     1     |  +1   |     0      |      1       | +MD
//     1     0     |  -1   |     1      |      1       | -MD
//     1     1     |   0   |     0      |      0       | 0
//
// so z = MR[i] ^ MR[i-1] and x = MR[i] & ~MR[i-1]. Read as a signed number the
// digits sum to the two's complement value of MR.
//
// Interface: mr (N bits) in; x and z (one line per bit of mr) out.
// Purely combinational.
module booth_encoder #(
  parameter int N = 4
) (
  input  logic [N-1:0] mr,
  output logic [N-1:0] x,
  output logic [N-1:0] z
);
  logic [N:0] mr_ext;  // mr with the implicit MR[-1] = 0 appended below

  assign mr_ext = {mr, 1'b0};

  for (genvar i = 0; i < N; i++) begin : g_enc
    assign z[i] = mr_ext[i+1] ^ mr_ext[i];
    assign x[i] = mr_ext[i+1] & ~mr_ext[i];
  end
endmodule
