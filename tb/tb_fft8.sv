// tb_fft8: end-to-end test of the 8-point FFT at its default sizes.
//
// Each vector drives eight samples and a (k, wr) pair, waits for the
// combinational outputs to settle, and checks all sixteen outputs exactly
// against a direct 8-point DFT computed here, sum over n of x[n]*W^(m*n), with
// the integer twiddle table W^t = (k, 0), (wr, -wr), (0, -k), (-wr, -wr),
// (-k, 0), (-wr, wr), (0, k), (wr, wr) for t = 0..7. That reference does not
// use the butterfly structure, so it checks the FFT ordering, the butterflies
// and the multipliers together.
//
// It also measures accuracy against a floating-point DFT with exact
// cos/sin: the largest bin error, divided by k, relative to the largest bin
// magnitude, must stay under 0.1 % for k = 1000 and k = 10000.
//
// Stimuli: impulses, DC, alternating and single-tone inputs, full-scale
// corners (all samples at the most positive or most negative value), a
// synthetic slow wave standing in for an EEG record, and random vectors, with
// k = 10, 100, 1000 and 10000 (wr = round(k*cos(pi/4))). Mechanisms counted,
// each required at least once: negative multiplicands (Booth -MD rows),
// non-zero wr twiddle products, the -j real/imaginary swap, full-scale growth
// of the DC bin, and each of the four scaling factors.
module tb_fft8;
  import fft_pkg::*;

  localparam int DATA_W = DATA_W_DEF;
  localparam int COEF_W = COEF_W_DEF;
  localparam int OUT_W  = DATA_W + COEF_W + 3;

  logic signed [DATA_W-1:0] x    [FFT_N];
  logic signed [COEF_W-1:0] wr, k;
  logic signed [OUT_W-1:0]  x_re [FFT_N];
  logic signed [OUT_W-1:0]  x_im [FFT_N];

  int checks = 0, failures = 0;
  int n_neg_md = 0, n_wr_twiddle = 0, n_swap = 0, n_full_scale = 0;
  int n_k [4] = '{0, 0, 0, 0};
  real worst_err [4] = '{0.0, 0.0, 0.0, 0.0};

  fft8 dut (.x(x), .wr(wr), .k(k), .x_re(x_re), .x_im(x_im));

  localparam real PI = 3.14159265358979323846;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integer twiddle table for exponent t (mod 8)
  function automatic void twiddle(int t, longint kk, longint ww,
                                  output longint tr, output longint ti);
    case (t % 8)
      0: begin tr =  kk; ti =   0; end
      1: begin tr =  ww; ti = -ww; end
      2: begin tr =   0; ti = -kk; end
      3: begin tr = -ww; ti = -ww; end
      4: begin tr = -kk; ti =   0; end
      5: begin tr = -ww; ti =  ww; end
      6: begin tr =   0; ti =  kk; end
      default: begin tr = ww; ti = ww; end
    endcase
  endfunction

  task automatic run_vector(int kidx);
    longint kk, ww;
    real    ref_re [FFT_N], ref_im [FFT_N];
    real    peak, err;
    kk = longint'(k);
    ww = longint'(wr);
    #1;
    // exact integer reference
    for (int m = 0; m < FFT_N; m++) begin
      longint er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < FFT_N; n++) begin
        longint tr, ti;
        twiddle(m * n, kk, ww, tr, ti);
        er += longint'(x[n]) * tr;
        ei += longint'(x[n]) * ti;
      end
      checks += 2;
      if (longint'(x_re[m]) != er || longint'(x_im[m]) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL k=%0d bin %0d got (%0d,%0d) exp (%0d,%0d)",
                   kk, m, x_re[m], x_im[m], er, ei);
      end
    end
    // floating-point accuracy
    peak = 0.0;
    for (int m = 0; m < FFT_N; m++) begin
      ref_re[m] = 0.0; ref_im[m] = 0.0;
      for (int n = 0; n < FFT_N; n++) begin
        ref_re[m] += real'(x[n]) * $cos(2.0 * PI * m * n / FFT_N);
        ref_im[m] -= real'(x[n]) * $sin(2.0 * PI * m * n / FFT_N);
      end
      if ($sqrt(ref_re[m]**2 + ref_im[m]**2) > peak) peak = $sqrt(ref_re[m]**2 + ref_im[m]**2);
    end
    if (peak > 0.0) begin
      for (int m = 0; m < FFT_N; m++) begin
        real dr, di;
        dr = real'(x_re[m]) / real'(kk) - ref_re[m];
        di = real'(x_im[m]) / real'(kk) - ref_im[m];
        err = $sqrt(dr**2 + di**2) / peak;
        if (err > worst_err[kidx]) worst_err[kidx] = err;
      end
    end
    // mechanism counters
    n_k[kidx]++;
    for (int n = 0; n < FFT_N; n++) if (x[n] < 0) begin n_neg_md++; break; end
    if ((x[1] - x[5]) != 0 || (x[3] - x[7]) != 0) n_wr_twiddle++;
    if (x_im[2] != 0) n_swap++;
    if (x_re[0] == 8 * longint'(x[0]) * kk && (x[0] == 16'sh7fff || x[0] == -16'sh8000)) begin
      n_full_scale++;
      for (int n = 1; n < FFT_N; n++) if (x[n] != x[0]) n_full_scale--;
    end
  endtask

  task automatic fill(int kind, int t);
    for (int n = 0; n < FFT_N; n++) begin
      case (kind)
        0: x[n] = (n == t % 8) ? 16'sd10000 : 16'sd0;                      // impulse
        1: x[n] = 16'sd1234;                                               // DC
        2: x[n] = n[0] ? -16'sd5000 : 16'sd5000;                           // alternating
        3: x[n] = DATA_W'($rtoi(9000.0 * $cos(2.0 * PI * (t % 4) * n / 8.0))); // tone
        4: x[n] = 16'sh7fff;                                               // + full scale
        5: x[n] = -16'sh8000;                                              // - full scale
        6: x[n] = DATA_W'($rtoi(-6.5 + 120.0 * $sin(2.0 * PI * 2.0 * n / 80.0)
                                + 40.0 * $sin(2.0 * PI * 11.0 * n / 80.0)));   // slow wave
        default: x[n] = DATA_W'($urandom);                                 // random
      endcase
    end
  endtask

  initial begin
    int kvals [4] = '{10, 100, 1000, K_SCALE_DEF};
    for (int kidx = 0; kidx < 4; kidx++) begin
      k  = COEF_W'(kvals[kidx]);
      wr = COEF_W'($rtoi(real'(kvals[kidx]) * $cos(PI / 4.0) + 0.5));
      if (kidx == 3 && wr != WR_DEF) failures++;
      for (int kind = 0; kind < 8; kind++)
        for (int t = 0; t < ((kind == 7) ? 500 : 8); t++) begin
          fill(kind, t);
          run_vector(kidx);
        end
    end
    for (int i = 0; i < 4; i++)
      $display("k=%0d wr=%0d: %0d vectors, worst bin error %.5f %% of the peak bin",
               kvals[i], $rtoi(real'(kvals[i]) * $cos(PI / 4.0) + 0.5), n_k[i], worst_err[i] * 100.0);
    $display("negative samples %0d, wr twiddle products %0d, -j swaps %0d, full-scale DC %0d",
             n_neg_md, n_wr_twiddle, n_swap, n_full_scale);
    checks++;
    if (worst_err[2] > 0.001 || worst_err[3] > 0.001) begin
      failures++;
      $display("FAIL accuracy above 0.1 %% for k >= 1000");
    end
    if (n_neg_md == 0 || n_wr_twiddle == 0 || n_swap == 0 || n_full_scale == 0) failures++;
    for (int i = 0; i < 4; i++) if (n_k[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
