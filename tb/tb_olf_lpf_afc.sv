// Frequency-response testbench of the on-line low-pass filter at its
// default size (N = 10, P = 2, b = 1/4, c = 1/2).
//
// The filter is fed cosine waves of amplitude 0.4 at frequencies k/32 of the
// sample rate, k = 1, 4, 8, 12, 14, 16, one after another. For each
// frequency the first 64 outputs are left for the transient to settle and the
// next 128 (whole periods) are correlated with the complex exponential of
// that frequency, as are the inputs; their ratio is the measured response,
// which must match the transfer function of the filter formula,
//   H(z) = (b + (c+1) z^-1 + z^-2) / (1 + c z^-1 + b z^-2),
// within 0.02 (the quantisation of inputs and outputs to 10 digits accounts
// for a few thousandths). The measured gain must also fall from the pass
// band to the highest frequency, as a low-pass filter's does.
module tb_olf_lpf_afc;
  import olf_pkg::*;

  localparam int N      = 10;
  localparam int P      = 2;
  localparam int FRAME  = N + 5 * P + 2 + 6;
  localparam int NF     = 6;
  localparam int SETTLE = 64;
  localparam int MEAS   = 128;
  localparam int PER_F  = SETTLE + MEAS;
  localparam int TOTAL  = NF * PER_F;
  localparam real PI    = 3.14159265358979;
  localparam real AMP   = 0.4;
  localparam real B     = 0.25;
  localparam real C     = 0.5;

  localparam int KS[NF] = '{1, 4, 8, 12, 14, 16};

  logic   clk = 1'b0;
  logic   rst;
  digit_t x_in, y_out;

  always #5 clk = ~clk;

  olf_lpf_top dut (.clk, .rst, .x_in, .y_out);

  int checks = 0;
  int failures = 0;

  initial begin
    repeat ((TOTAL + 4) * FRAME + 50) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xdig[TOTAL][N];
  int xv[TOTAL];
  int yv[TOTAL];

  initial begin
    real gain[NF];
    for (int s = 0; s < TOTAL; s++) begin
      int k, n, v, m;
      k = KS[s / PER_F];
      n = s % PER_F;
      v = $rtoi(AMP * (1 << N) * $cos(2.0 * PI * k * n / 32.0));
      xv[s] = v;
      m = (v < 0) ? -v : v;
      for (int j = 1; j <= N; j++)
        xdig[s][j-1] = ((m >> (N - j)) & 1) == 0 ? 0 : ((v < 0) ? -1 : 1);
    end

    rst  = 1'b1;
    x_in = DIG_ZERO;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int f = 0; f <= TOTAL; f++) begin
      int y;
      y = 0;
      for (int t = 0; t < FRAME; t++) begin
        x_in = (f < TOTAL && t < N) ? dig_enc(2'(xdig[f][t])) : DIG_ZERO;
        if (t < N) y = 2 * y + int'(dig_val(y_out));
        @(negedge clk);
      end
      if (f >= 1) yv[f-1] = y;
    end

    for (int q = 0; q < NF; q++) begin
      real w, xr, xi, yr, yi, den, hr, hi, er, ei, zr, zi, z2r, z2i, nr, ni, dr, di;
      w = 2.0 * PI * KS[q] / 32.0;
      xr = 0; xi = 0; yr = 0; yi = 0;
      for (int n = SETTLE; n < PER_F; n++) begin
        int s;
        s = q * PER_F + n;
        xr += xv[s] * $cos(w * n);  xi -= xv[s] * $sin(w * n);
        yr += yv[s] * $cos(w * n);  yi -= yv[s] * $sin(w * n);
      end
      // Measured response Y / X.
      den = xr * xr + xi * xi;
      hr = (yr * xr + yi * xi) / den;
      hi = (yi * xr - yr * xi) / den;
      // Exact response at z^-1 = e^{-jw}.
      zr = $cos(w);        zi = -$sin(w);
      z2r = $cos(2.0 * w); z2i = -$sin(2.0 * w);
      nr = B + (C + 1.0) * zr + z2r;  ni = (C + 1.0) * zi + z2i;
      dr = 1.0 + C * zr + B * z2r;    di = C * zi + B * z2i;
      er = (nr * dr + ni * di) / (dr * dr + di * di);
      ei = (ni * dr - nr * di) / (dr * dr + di * di);
      gain[q] = $sqrt(hr * hr + hi * hi);
      $display("k=%0d/32: measured gain %f phase %f, expected gain %f phase %f",
               KS[q], gain[q], $atan2(hi, hr), $sqrt(er * er + ei * ei), $atan2(ei, er));
      checks++;
      if ($sqrt((hr - er) * (hr - er) + (hi - ei) * (hi - ei)) > 0.02) begin
        failures++;
        $display("FAIL response at k=%0d", KS[q]);
      end
    end
    checks++;
    if (!(gain[0] > 2.0 * gain[NF-1])) begin
      failures++;
      $display("FAIL not low-pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
