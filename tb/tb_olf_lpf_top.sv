// End-to-end testbench of the on-line low-pass filter at its default size
// (N = 10 digits per sample, on-line delay P = 2, b = 1/4, c = 1/2).
//
// The input is a sampled sine wave, then a long run near +0.9 that drives
// the output into saturation (the DC gain is (b+c+2)/(1+b+c) = 11/7), then
// random signed-digit words that use the redundant -1 digits. Samples are
// sent serially one frame apart; the output stream is decoded and every
// output is compared with the filter formula evaluated in exact integer
// arithmetic on the inputs sent and on the outputs the filter returned for
// the two previous samples (so a one-unit rounding difference cannot build
// up through the feedback). An output may differ from the exact value by less
// than one unit in the last place, or must equal the saturation value.
//
// The frame length K + 6 = N + 5P + 8 clocks and the one-frame latency are
// checked implicitly: the stimulus is laid out with them, and any other
// timing would give wrong results. The mechanisms of the design are counted
// and each must occur: correct non-zero results delivered one frame after
// their input, which five dependent K-step operations can only achieve by
// overlapping (FRAME < 2K), saturated outputs, negative output digits, and
// frames whose feedback operands are non-zero.
module tb_olf_lpf_top;
  import olf_pkg::*;

  localparam int N      = 10;
  localparam int P      = 2;
  localparam int FRAME  = N + 5 * P + 2 + 6;
  localparam int FRAMES = 160;
  localparam longint B_Q = 256;   // 1/4
  localparam longint C_Q = 512;   // 1/2
  localparam longint MAXY = (1 << N) - 1;

  logic   clk = 1'b0;
  logic   rst;
  digit_t x_in;
  digit_t y_out;

  always #5 clk = ~clk;

  olf_lpf_top dut (.clk, .rst, .x_in, .y_out);

  int checks = 0;
  int failures = 0;
  int n_overlap = 0, n_sat = 0, n_negdig = 0, n_feedback = 0;

  // Watchdog.
  initial begin
    repeat ((FRAMES + 4) * FRAME + 50) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     xdig[FRAMES][N];
  longint xval[FRAMES];
  longint yval[FRAMES];

  function automatic longint labs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Sign-magnitude digits of v / 2^N.
  task automatic set_sm(int f, longint v);
    longint m = labs(v);
    for (int j = 1; j <= N; j++)
      xdig[f][j-1] = ((m >> (N - j)) & 1) == 0 ? 0 : ((v < 0) ? -1 : 1);
  endtask

  initial begin
    // Stimulus.
    for (int f = 0; f < FRAMES; f++) begin
      if (f < 60) begin
        set_sm(f, longint'($rtoi(0.5 * (1 << N) * $sin(2.0 * 3.14159265 * f / 16.0))));
      end else if (f < 90) begin
        set_sm(f, longint'(922));      // about +0.9
      end else begin
        for (int j = 0; j < N; j++) xdig[f][j] = int'($urandom_range(2)) - 1;
      end
      xval[f] = 0;
      for (int j = 0; j < N; j++) xval[f] = 2 * xval[f] + longint'(xdig[f][j]);
    end

    rst  = 1'b1;
    x_in = DIG_ZERO;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // One extra frame to collect the last output.
    for (int f = 0; f <= FRAMES; f++) begin
      longint yv;
      yv = 0;
      for (int t = 0; t < FRAME; t++) begin
        // Here the filter is in cycle t of frame f.
        x_in = (f < FRAMES && t < N) ? dig_enc(2'(xdig[f][t])) : DIG_ZERO;
        if (t < N) begin
          yv = 2 * yv + longint'(dig_val(y_out));
          if (dig_val(y_out) < 0) n_negdig++;
        end else begin
          checks++;
          if (y_out != DIG_ZERO) begin
            failures++;
            $display("FAIL frame %0d: output digit driven in cycle %0d", f, t);
          end
        end
        @(negedge clk);
      end
      // Frame f carried y of frame f-1.
      if (f >= 1) begin
        int i;
        longint x1, x2, y1, y2, exact, clamped, err;
        i = f - 1;
        yval[i] = yv;
        x1 = (i >= 1) ? xval[i-1] : 0;
        x2 = (i >= 2) ? xval[i-2] : 0;
        y1 = (i >= 1) ? yval[i-1] : 0;
        y2 = (i >= 2) ? yval[i-2] : 0;
        if (y1 != 0 || y2 != 0) n_feedback++;
        // Everything times 2^(2N).
        exact = B_Q * (xval[i] - y2) + C_Q * (x1 - y1) + ((x2 + x1) <<< N);
        clamped = exact;
        if (clamped > (MAXY <<< N))  clamped = MAXY <<< N;
        if (clamped < -(MAXY <<< N)) clamped = -(MAXY <<< N);
        if (labs(exact) > ((MAXY + 1) <<< N)) n_sat++;
        err = labs((yv <<< N) - clamped);
        checks++;
        if (err >= (longint'(1) <<< N)) begin
          failures++;
          $display("FAIL sample %0d: y=%0d exact=%0d/2^%0d", i, yv, exact, N);
        end else if (yv != 0) begin
          // A correct non-zero result one frame (FRAME < 2K cycles) after its
          // input: the five dependent K-step operations must have overlapped.
          n_overlap++;
        end
      end
    end

    $display("frames=%0d cycles/sample=%0d (five blocks in sequence: %0d)",
             FRAMES, FRAME, 5 * (N + 5 * P + 2));
    $display("overlapped samples=%0d saturated=%0d negative output digits=%0d feedback frames=%0d",
             n_overlap, n_sat, n_negdig, n_feedback);
    checks++; if (n_overlap == 0)  begin failures++; $display("FAIL no overlap"); end
    checks++; if (n_sat == 0)      begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_negdig == 0)   begin failures++; $display("FAIL no negative output digit"); end
    checks++; if (n_feedback == 0) begin failures++; $display("FAIL no feedback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
