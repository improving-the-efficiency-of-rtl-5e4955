// Size sweep of the on-line filter over the word lengths and on-line delays
// of the published iteration-count comparison, N = 10, 20, 30, 40 digits,
// plus N = 50, the longest word of the resource comparison, each with
// P = 2, 3, 4: fifteen filters run side by side (see lpf_sweep_lane). Each
// output must be within one unit in the last place of the exact filter value
// or at saturation. Prints the cycles per sample of every configuration,
// N + 5P + 8, next to the cycles five blocks of the same length would need
// one after another.
module tb_olf_lpf_sweep;

  localparam int NN = 5;
  localparam int NP = 3;
  localparam int SAMPLES = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done[NN][NP];
  int   chk[NN][NP], fail[NN][NP], inr[NN][NP];

  for (genvar a = 0; a < NN; a++) begin : g_n
    for (genvar b = 0; b < NP; b++) begin : g_p
      lpf_sweep_lane #(.N(10 * (a + 1)), .P(b + 2), .SAMPLES(SAMPLES)) u_lane (
        .clk, .done(done[a][b]), .checks(chk[a][b]), .failures(fail[a][b]),
        .in_range(inr[a][b]));
    end
  end

  int checks = 0;
  int failures = 0;

  initial begin
    repeat ((SAMPLES + 4) * (50 + 5 * 4 + 8) + 100) @(posedge clk);
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int a = 0; a < NN; a++)
        for (int b = 0; b < NP; b++)
          if (!done[a][b]) all_done = 1'b0;
    end while (!all_done);
    for (int a = 0; a < NN; a++)
      for (int b = 0; b < NP; b++) begin
        int n, p;
        n = 10 * (a + 1);
        p = b + 2;
        $display("N=%0d P=%0d: cycles/sample %0d (blocks in sequence %0d), %0d checks, %0d failures, %0d in range",
                 n, p, n + 5 * p + 8, 5 * (n + 5 * p + 2), chk[a][b], fail[a][b], inr[a][b]);
        checks += chk[a][b];
        failures += fail[a][b];
        // Every lane must have seen in-range outputs, or its check is weak.
        checks++;
        if (inr[a][b] == 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
