// fft8: 8-point radix-2 decimation-in-time FFT of real samples, with every
// product formed by the Booth-encoded Wallace tree multiplier.
//
// Number format. Samples are integers: the real value times a power-of-ten
// scaling factor (10000 by default). Two coefficients are inputs: k, the
// scaling factor itself, and wr = round(k * cos(pi/4)), the magnitude of the
// irrational twiddle factors (7071 for k = 10000). The twiddle factors of the
// 8-point transform are then W^0 = k, W^2 = -j*k, W^1 = wr*(1 - j) and
// W^3 = -wr*(1 + j), all in units of 1/k. Instead of dividing products back by
// k, every branch is multiplied by k or by wr, so each output bin is the exact
// DFT of the input integers times k (with cos(pi/4) rounded to wr/k).
// Real outputs therefore carry the scale (sample scale) * k.
//
// Structure (all combinational):
//   stage 1  butterflies on pairs (x0,x4) (x2,x6) (x1,x5) (x3,x7)
//   stage 2  4-point DFTs E (even samples) and O (odd samples); the -j twiddle
//            is a swap of real and imaginary part, so no multiplier is needed
//   scaling  eight booth_wallace_mult instances: k*E0, k*E2, k*Re(E1),
//            k*Im(E1), k*O0, k*O2, and wr*(a-b), wr*(a+b) for
//            O1 = a - j*b, which give W^1*O1 and W^3*O3 together
//   stage 3  final butterflies X[m] = E[m] + W^m O[m], X[m+4] = E[m] - W^m O[m]
// Because the inputs are real, E3 = conj(E1) and O3 = conj(O1); the design uses
// that to need eight multipliers rather than one per complex product.
//
// What follows the reference design: the 8-point radix-2 DIT transform of eight
// real time-domain samples, the inputs wr and k, the powers-of-ten scaling,
// separate real and imaginary outputs, and Booth-encoded Wallace multipliers.
// This design's own choices: the word widths, the multiply-by-k scaling in
// place of a division, the real-input symmetry, and the absence of registers.
//
// Interface: x[0..7] (DATA_W-bit signed), wr and k (COEF_W-bit signed) in;
// x_re[0..7], x_im[0..7] (DATA_W+COEF_W+3 bits, signed) out. No clock: the
// outputs follow the inputs after the combinational delay.
module fft8
  import fft_pkg::*;
#(
  parameter int DATA_W = DATA_W_DEF,
  parameter int COEF_W = COEF_W_DEF,
  localparam int OUT_W = DATA_W + COEF_W + 3
) (
  input  logic signed [DATA_W-1:0] x    [FFT_N],
  input  logic signed [COEF_W-1:0] wr,
  input  logic signed [COEF_W-1:0] k,
  output logic signed [OUT_W-1:0]  x_re [FFT_N],
  output logic signed [OUT_W-1:0]  x_im [FFT_N]
);
  localparam int S1_W = DATA_W + 1;       // after stage 1
  localparam int S2_W = DATA_W + 2;       // after stage 2
  localparam int P_W  = S2_W + COEF_W;    // multiplier product

  // ---------------- stage 1 ----------------
  logic signed [S1_W-1:0] s0e, d0e, s1e, d1e;  // even samples x0 x2 x4 x6
  logic signed [S1_W-1:0] s0o, d0o, s1o, d1o;  // odd samples  x1 x3 x5 x7

  always_comb begin
    s0e = S1_W'(x[0]) + S1_W'(x[4]);
    d0e = S1_W'(x[0]) - S1_W'(x[4]);
    s1e = S1_W'(x[2]) + S1_W'(x[6]);
    d1e = S1_W'(x[2]) - S1_W'(x[6]);
    s0o = S1_W'(x[1]) + S1_W'(x[5]);
    d0o = S1_W'(x[1]) - S1_W'(x[5]);
    s1o = S1_W'(x[3]) + S1_W'(x[7]);
    d1o = S1_W'(x[3]) - S1_W'(x[7]);
  end

  // ---------------- stage 2 ----------------
  // E0 = s0e + s1e, E2 = s0e - s1e, E1 = d0e - j*d1e, E3 = conj(E1)
  // O0 = s0o + s1o, O2 = s0o - s1o, O1 = d0o - j*d1o, O3 = conj(O1)
  // For the odd half only (a - b) and (a + b) of O1 = a - j*b are needed.
  logic signed [S2_W-1:0] mul_in [8];

  always_comb begin
    mul_in[0] = S2_W'(s0e) + S2_W'(s1e);   // E0
    mul_in[1] = S2_W'(s0e) - S2_W'(s1e);   // E2
    mul_in[2] = S2_W'(d0e);                // Re E1
    mul_in[3] = S2_W'(d1e);                // -Im E1
    mul_in[4] = S2_W'(s0o) + S2_W'(s1o);   // O0
    mul_in[5] = S2_W'(s0o) - S2_W'(s1o);   // O2
    mul_in[6] = S2_W'(d0o) - S2_W'(d1o);   // a - b
    mul_in[7] = S2_W'(d0o) + S2_W'(d1o);   // a + b
  end

  // ---------------- scaling / twiddle products ----------------
  logic signed [P_W-1:0] m [8];

  for (genvar i = 0; i < 8; i++) begin : g_mul
    booth_wallace_mult #(.MD_W(S2_W), .MR_W(COEF_W)) u_mult (
      .signed_mode(1'b1),
      .md         (mul_in[i]),
      .mr         ((i >= 6) ? wr : k),
      .prod       (m[i])
    );
  end

  // ---------------- stage 3 ----------------
  // kE0 = m0, kE2 = m1, kE1 = m2 - j*m3, kO0 = m4, -j*kO2 = -j*m5,
  // W^1 O1 = m6 - j*m7, W^3 O3 = -m6 - j*m7
  logic signed [OUT_W-1:0] e0, e2, e1r, e1i, o0, o2, p, q;

  always_comb begin
    e0  = OUT_W'(m[0]);
    e2  = OUT_W'(m[1]);
    e1r = OUT_W'(m[2]);
    e1i = OUT_W'(m[3]);
    o0  = OUT_W'(m[4]);
    o2  = OUT_W'(m[5]);
    p   = OUT_W'(m[6]);
    q   = OUT_W'(m[7]);

    x_re[0] = e0 + o0;    x_im[0] = '0;
    x_re[4] = e0 - o0;    x_im[4] = '0;
    x_re[2] = e2;         x_im[2] = -o2;
    x_re[6] = e2;         x_im[6] = o2;
    x_re[1] = e1r + p;    x_im[1] = -e1i - q;
    x_re[5] = e1r - p;    x_im[5] = -e1i + q;
    x_re[3] = e1r - p;    x_im[3] = e1i - q;
    x_re[7] = e1r + p;    x_im[7] = e1i + q;
  end
endmodule
