// Self-checking testbench for the filter sequencer sf_ctrl (N = 10, P = 2,
// b = 1/4, c = 1/2, so K = 22 and a frame is 28 cycles).
//
// The testbench stands in for the computing blocks: it sends input samples
// on x_in and a result digit stream on sm3_z, and checks every output of the
// sequencer in every cycle of several frames against a cycle table worked
// out here from the frame layout:
//   * level l reset low exactly in cycles l-1 .. l-1+K-1;
//   * the new sample passed to SB_1 in cycles 0..N-1, the stored y_{i-2},
//     x_{i-1}, y_{i-1} replayed to SB_1/SB_2 in the same cycles;
//   * b and c digits to ML_1/ML_2 in cycles 1..N;
//   * x_{i-2} to SM_1 from cycle 3+3P, x_{i-1} to SM_3 from cycle 4+4P;
//   * the collected result rounded, saturated and sent on y_out (and fed
//     back) in sign-magnitude digits one frame later.
// Result streams alternate between in-range values (leading 5P digits zero)
// and full-length random ones that must saturate.
module tb_sf_ctrl;
  import olf_pkg::*;

  localparam int N      = 10;
  localparam int P      = 2;
  localparam int K      = N + 5 * P + 2;
  localparam int FRAME  = K + 6;
  localparam int FRAMES = 40;
  localparam longint MAXY = (1 << N) - 1;

  logic       clk = 1'b0;
  logic       rst;
  digit_t     x_in, y_out, sm3_z;
  logic [4:0] lvl_rst;
  digit_t     sb1_x, sb1_y, sb2_x, sb2_y, ml1_y, ml2_y, sm1_y, sm3_y;

  always #5 clk = ~clk;

  sf_ctrl dut (
    .clk, .rst, .x_in, .y_out, .lvl_rst,
    .sb1_x, .sb1_y, .sb2_x, .sb2_y, .ml1_y, .ml2_y, .sm1_y, .sm3_y,
    .sm3_z
  );

  int checks = 0;
  int failures = 0;
  int n_sat = 0, n_inrange = 0;

  initial begin
    repeat ((FRAMES + 3) * FRAME + 50) @(posedge clk);
    failures++;
    $display("TB watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xd[FRAMES][N];         // input sample digits
  int zd[FRAMES][K];         // result stream digits
  int yd[-2:FRAMES][N];      // expected stored outputs (sign-magnitude digits)
  int bd[N], cd[N];

  task automatic expect_d(string what, int f, int t, digit_t got, int exp_v);
    checks++;
    if (int'(dig_val(got)) != exp_v || (exp_v == 0 && got != DIG_ZERO)) begin
      failures++;
      if (failures < 20)
        $display("FAIL frame %0d cycle %0d %s: got %0d expected %0d",
                 f, t, what, dig_val(got), exp_v);
    end
  endtask

  function automatic void sm_digits(longint v, ref int d[N]);
    longint m = (v < 0) ? -v : v;
    for (int j = 1; j <= N; j++)
      d[j-1] = ((m >> (N - j)) & 1) == 0 ? 0 : ((v < 0) ? -1 : 1);
  endfunction

  initial begin
    int tmp[N];
    // Coefficients 1/4 and 1/2.
    for (int j = 0; j < N; j++) begin bd[j] = (j == 1); cd[j] = (j == 0); end
    for (int j = 0; j < N; j++) begin yd[-2][j] = 0; yd[-1][j] = 0; end

    // Stimulus and expected stored outputs.
    for (int f = 0; f < FRAMES; f++) begin
      longint v, yq;
      for (int j = 0; j < N; j++) xd[f][j] = int'($urandom_range(2)) - 1;
      for (int j = 0; j < K; j++)
        zd[f][j] = (f % 2 == 0 && j < 5 * P) ? 0 : int'($urandom_range(2)) - 1;
      v = 0;
      for (int j = 0; j < K; j++) v = 2 * v + longint'(zd[f][j]);
      // Round to N fraction bits of the unscaled output: drop K-5P-N = 2 digits.
      yq = (v + 2) >>> 2;
      if (yq > MAXY)       begin yq = MAXY;  n_sat++; end
      else if (yq < -MAXY) begin yq = -MAXY; n_sat++; end
      else begin
        n_inrange++;
        checks++;
        if ((yq * 4 - v) > 2 || (yq * 4 - v) < -2) failures++;
      end
      sm_digits(yq, tmp);
      for (int j = 0; j < N; j++) yd[f][j] = tmp[j];
    end

    rst   = 1'b1;
    x_in  = DIG_ZERO;
    sm3_z = DIG_ZERO;
    repeat (3) @(negedge clk);
    // A reset cycle holds every level in reset.
    checks++;
    if (lvl_rst != 5'b11111) failures++;
    rst = 1'b0;

    for (int f = 0; f < FRAMES; f++) begin
      for (int t = 0; t < FRAME; t++) begin
        x_in  = (t < N) ? dig_enc(2'(xd[f][t])) : DIG_ZERO;
        sm3_z = (t >= 5 && t < 5 + K) ? dig_enc(2'(zd[f][t-5])) : DIG_ZERO;
        #1;
        for (int l = 0; l < 5; l++) begin
          checks++;
          if (lvl_rst[l] != !(t >= l && t < l + K)) begin
            failures++;
            if (failures < 20) $display("FAIL frame %0d cycle %0d level %0d reset", f, t, l + 1);
          end
        end
        expect_d("sb1_x", f, t, sb1_x, (t < N) ? xd[f][t] : 0);
        expect_d("sb1_y", f, t, sb1_y, (t < N) ? yd[f-2][t] : 0);
        expect_d("sb2_x", f, t, sb2_x, (t < N && f >= 1) ? xd[f-1][t] : 0);
        expect_d("sb2_y", f, t, sb2_y, (t < N) ? yd[f-1][t] : 0);
        expect_d("y_out", f, t, y_out, (t < N) ? yd[f-1][t] : 0);
        expect_d("ml1_y", f, t, ml1_y, (t >= 1 && t <= N) ? bd[t-1] : 0);
        expect_d("ml2_y", f, t, ml2_y, (t >= 1 && t <= N) ? cd[t-1] : 0);
        expect_d("sm1_y", f, t, sm1_y,
                 (f >= 2 && t >= 3 + 3 * P && t < 3 + 3 * P + N) ? xd[f-2][t-3-3*P] : 0);
        expect_d("sm3_y", f, t, sm3_y,
                 (f >= 1 && t >= 4 + 4 * P && t < 4 + 4 * P + N) ? xd[f-1][t-4-4*P] : 0);
        @(negedge clk);
      end
    end

    $display("saturated=%0d in range=%0d", n_sat, n_inrange);
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_inrange == 0) begin failures++; $display("FAIL no in-range output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
