// One lane of the size sweep: an olf_lpf_top with N digits per sample and
// on-line delay P (coefficients at their defaults b = 1/4, c = 1/2), fed
// SAMPLES random signed-digit samples and checked against the filter formula
// in exact wide integer arithmetic, using the filter's own earlier outputs as
// the fed-back values. Half of the samples have a zero leading digit
// (|x| < 1/2) so that most outputs stay in range; the others may saturate.
// Reports the number of checks and failures when done goes high.
module lpf_sweep_lane
  import olf_pkg::*;
#(
  parameter int N       = 10,
  parameter int P       = 2,
  parameter int SAMPLES = 40
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   in_range
);

  localparam int FRAME = N + 5 * P + 8;
  typedef logic signed [127:0] w_t;

  logic   rst;
  digit_t x_in, y_out;

  olf_lpf_top #(.N(N), .P(P)) dut (.clk, .rst, .x_in, .y_out);

  int xdig[SAMPLES][N];
  w_t xval[SAMPLES];
  w_t yval[SAMPLES];

  function automatic w_t wabs(w_t v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    w_t bq, cq, maxy, one_n;
    bq    = w_t'(1) <<< (N - 2);
    cq    = w_t'(1) <<< (N - 1);
    one_n = w_t'(1) <<< N;
    maxy  = one_n - 1;
    done = 1'b0;
    checks = 0;
    failures = 0;
    in_range = 0;
    for (int s = 0; s < SAMPLES; s++) begin
      xval[s] = 0;
      for (int j = 0; j < N; j++) begin
        xdig[s][j] = (j == 0 && s % 2 == 0) ? 0 : int'($urandom_range(2)) - 1;
        xval[s] = 2 * xval[s] + w_t'(xdig[s][j]);
      end
    end

    rst  = 1'b1;
    x_in = DIG_ZERO;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int f = 0; f <= SAMPLES; f++) begin
      w_t yv;
      yv = 0;
      for (int t = 0; t < FRAME; t++) begin
        x_in = (f < SAMPLES && t < N) ? dig_enc(2'(xdig[f][t])) : DIG_ZERO;
        if (t < N) yv = 2 * yv + w_t'(dig_val(y_out));
        @(negedge clk);
      end
      if (f >= 1) begin
        int i;
        w_t x1, x2, y1, y2, exact, clamped;
        i = f - 1;
        yval[i] = yv;
        x1 = (i >= 1) ? xval[i-1] : 0;
        x2 = (i >= 2) ? xval[i-2] : 0;
        y1 = (i >= 1) ? yval[i-1] : 0;
        y2 = (i >= 2) ? yval[i-2] : 0;
        exact = bq * (xval[i] - y2) + cq * (x1 - y1) + ((x2 + x1) <<< N);
        clamped = exact;
        if (clamped > maxy * one_n)  clamped = maxy * one_n;
        else if (clamped < -(maxy * one_n)) clamped = -(maxy * one_n);
        else in_range++;
        checks++;
        if (wabs(yv * one_n - clamped) >= one_n) begin
          failures++;
          $display("FAIL N=%0d P=%0d sample %0d: y=%0d", N, P, i, yv);
        end
      end
    end
    done = 1'b1;
  end

endmodule
