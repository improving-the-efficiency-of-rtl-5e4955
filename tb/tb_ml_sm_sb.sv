// Self-checking testbench for the on-line computing block ml_sm_sb.
//
// Four instances share the same operand digit streams: an adder, a
// subtractor and a multiplier with on-line delay 2, and a multiplier with
// delay 3. Every trial clears the blocks, feeds K digit pairs (random, or one
// of the extreme patterns) and records the K result digits. Each result is
// checked two ways:
//   * digit by digit against a model of the recurrence written here with
//     integers, which also pins the timing: z_i must be on the output right
//     after the edge that takes x_i and y_i;
//   * as a value: sum z_j 2^-j must equal 2^-p op(X, Y) within 2^-k / 2.
module tb_ml_sm_sb;
  import olf_pkg::*;

  localparam int unsigned K      = 16;
  localparam int unsigned TRIALS = 400;

  logic   clk = 1'b0;
  logic   rst;
  digit_t xi, yi;
  digit_t z_add, z_sub, z_mul2, z_mul3;

  always #5 clk = ~clk;

  ml_sm_sb #(.OP(OP_ADD), .P(2), .K(K)) u_add  (.clk, .rst, .xi, .yi, .zi(z_add));
  ml_sm_sb #(.OP(OP_SUB), .P(2), .K(K)) u_sub  (.clk, .rst, .xi, .yi, .zi(z_sub));
  ml_sm_sb #(.OP(OP_MUL), .P(2), .K(K)) u_mul2 (.clk, .rst, .xi, .yi, .zi(z_mul2));
  ml_sm_sb #(.OP(OP_MUL), .P(3), .K(K)) u_mul3 (.clk, .rst, .xi, .yi, .zi(z_mul3));

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  always @(posedge clk) cycles <= cycles + 1;

  // Watchdog.
  initial begin
    repeat (TRIALS * (K + 4) + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs[1:K], ys[1:K];
  int za[1:K], zs[1:K], zm2[1:K], zm3[1:K];

  // Integer model of the recurrence; all values scaled by 2^(K+p).
  function automatic void model(input op_e op, input int p, ref int zo[1:K]);
    longint r, xp, yp, xn, yn, f, n, half, one;
    half = longint'(1) <<< (K + p - 1);
    one  = longint'(1) <<< (K + p);
    r = 0; xp = 0; yp = 0;
    for (int i = 1; i <= K; i++) begin
      xn = xp + xs[i] * (longint'(1) <<< (K + p - i));
      yn = yp + ys[i] * (longint'(1) <<< (K + p - i));
      case (op)
        OP_ADD:  f = longint'(xs[i] + ys[i]) <<< K;
        OP_SUB:  f = longint'(xs[i] - ys[i]) <<< K;
        default: f = (xs[i] * yn + ys[i] * xp) >>> p;
      endcase
      n = 2 * r + f;
      if (n >= half)      zo[i] = 1;
      else if (n < -half) zo[i] = -1;
      else                zo[i] = 0;
      r  = n - zo[i] * one;
      xp = xn;
      yp = yn;
    end
  endfunction

  function automatic longint stream_int(ref int d[1:K]);
    longint v = 0;
    for (int i = 1; i <= K; i++) v = 2 * v + d[i];
    return v;
  endfunction

  function automatic longint labs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check_digits(string name, op_e op, int p, ref int got[1:K]);
    int exp_d[1:K];
    model(op, p, exp_d);
    for (int i = 1; i <= K; i++) begin
      checks++;
      if (got[i] != exp_d[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s digit %0d: got %0d expected %0d", name, i, got[i], exp_d[i]);
      end
    end
  endtask

  task automatic run_trial();
    // Clear.
    @(negedge clk);
    rst = 1'b1;
    xi  = DIG_ZERO;
    yi  = DIG_ZERO;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 1; i <= K; i++) begin
      xi = dig_enc(2'(xs[i]));
      yi = dig_enc(2'(ys[i]));
      @(negedge clk);
      // The edge just passed took digit i: result digit i must be out now.
      za[i]  = int'(dig_val(z_add));
      zs[i]  = int'(dig_val(z_sub));
      zm2[i] = int'(dig_val(z_mul2));
      zm3[i] = int'(dig_val(z_mul3));
    end
    xi = DIG_ZERO;
    yi = DIG_ZERO;

    check_digits("add",  OP_ADD, 2, za);
    check_digits("sub",  OP_SUB, 2, zs);
    check_digits("mul2", OP_MUL, 2, zm2);
    check_digits("mul3", OP_MUL, 3, zm3);

    // Value checks: |Z 2^p - op| within 2^(p-1) units of the last digit.
    begin
      longint xv, yv, zv;
      xv = stream_int(xs);
      yv = stream_int(ys);
      zv = stream_int(za);
      checks++;
      if (labs(zv * 4 - (xv + yv)) > 2) begin
        failures++;
        $display("FAIL add value: z=%0d x=%0d y=%0d", zv, xv, yv);
      end
      zv = stream_int(zs);
      checks++;
      if (labs(zv * 4 - (xv - yv)) > 2) begin
        failures++;
        $display("FAIL sub value: z=%0d x=%0d y=%0d", zv, xv, yv);
      end
      zv = stream_int(zm2);
      checks++;
      if (labs(zv * (longint'(1) <<< (K + 2)) - xv * yv) > (longint'(1) <<< (K + 1))) begin
        failures++;
        $display("FAIL mul2 value: z=%0d x=%0d y=%0d", zv, xv, yv);
      end
      zv = stream_int(zm3);
      checks++;
      if (labs(zv * (longint'(1) <<< (K + 3)) - xv * yv) > (longint'(1) <<< (K + 2))) begin
        failures++;
        $display("FAIL mul3 value: z=%0d x=%0d y=%0d", zv, xv, yv);
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    xi  = DIG_ZERO;
    yi  = DIG_ZERO;
    repeat (2) @(negedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      for (int i = 1; i <= K; i++) begin
        case (t)
          0: begin xs[i] = 1;  ys[i] = 1;  end   // both operands near +1
          1: begin xs[i] = -1; ys[i] = -1; end   // both near -1
          2: begin xs[i] = 1;  ys[i] = -1; end   // opposite extremes
          3: begin xs[i] = 0;  ys[i] = 0;  end
          default: begin
            xs[i] = int'($urandom_range(2)) - 1;
            ys[i] = int'($urandom_range(2)) - 1;
          end
        endcase
      end
      run_trial();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
