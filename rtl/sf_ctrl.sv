// Sequencer of the on-line recursive filter.
//
// One sample is handled per frame of FRAME = K + 6 clocks, K being the number
// of digits every computing block produces (see olf_pkg::steps_per_block).
// The sequencer
//   * counts the frame cycle t, 0 .. FRAME-1;
//   * releases the reset of the five levels of computing blocks one cycle
//     apart (level l runs for t = l-1 .. l-1+K-1), so each level takes digit
//     j of its operands in the cycle after the level below produced it;
//   * passes the new input sample x_i from the serial input straight to the
//     first subtractor while it arrives, and stores it;
//   * replays the stored samples x_{i-1}, x_{i-2}, y_{i-1}, y_{i-2} and the
//     coefficients b and c as digit streams, each lined up with the level it
//     enters. A block's result is its operation scaled by 2^-p, so an operand
//     that joins the chain after L levels is scaled by 2^-Lp as well, which
//     for a digit stream is a start Lp cycles later: x_{i-2} enters the
//     fourth level 3p steps late, x_{i-1} the fifth level 4p steps late;
//   * collects the result digits of the last block (the filter output
//     scaled by 2^-5p) into a two's complement word, rounds it to N fraction
//     bits, saturates it to the range of an N-digit fraction and stores it as
//     y_i;
//   * sends y_{i-1}, the result of the previous frame, on the serial output.
//
// Every sample is an N-digit signed-digit fraction (|value| < 1), sent most
// significant digit first. Stored samples and the coefficients are kept in
// sign-magnitude form, one digit per bit.
//
// Interface and timing (all synchronous to clk, rst active high):
//   x_in     digit j of sample x_i is taken in frame cycle t = j-1 (j = 1..N);
//            the first frame starts in the first cycle with rst low.
//   y_out    digit j of y_{i-1} is driven in frame cycle t = j-1, 0 elsewhere;
//            y_i thus appears one frame after x_i.
//   lvl_rst  reset of level l (bit l-1): SB_1/SB_2, ML_1/ML_2, SM_2, SM_1,
//            SM_3.
//   sb*_x/y, ml*_y, sm1_y, sm3_y  operand streams for the blocks.
//   sm3_z    result digits of the last block; digit j is read in t = j+4.
// The role of the sequencer, its level resets and its stored past samples
// follow the published structure; the frame layout, the counting direction,
// rounding, saturation and the sign-magnitude storage are choices of this
// design.
module sf_ctrl
  import olf_pkg::*;
#(
  parameter int unsigned N   = 10,            // digits per sample
  parameter int unsigned P   = 2,             // on-line delay of every block
  parameter longint      B_Q = longint'(1) <<< (N - 2),  // coefficient b times 2^N
  parameter longint      C_Q = longint'(1) <<< (N - 1)   // coefficient c times 2^N
) (
  input  logic       clk,
  input  logic       rst,
  input  digit_t     x_in,
  output digit_t     y_out,
  output logic [4:0] lvl_rst,
  output digit_t     sb1_x,
  output digit_t     sb1_y,
  output digit_t     sb2_x,
  output digit_t     sb2_y,
  output digit_t     ml1_y,
  output digit_t     ml2_y,
  output digit_t     sm1_y,
  output digit_t     sm3_y,
  input  digit_t     sm3_z
);

  localparam int unsigned K     = steps_per_block(N, P);
  localparam int unsigned FRAME = frame_cycles(N, P);
  localparam int unsigned SH    = K - 5 * P - N;   // guard digits dropped
  localparam int unsigned TW    = $clog2(FRAME);

  localparam int unsigned SM1_T0 = 3 + 3 * P;      // first x_{i-2} digit to SM_1
  localparam int unsigned SM3_T0 = 4 + 4 * P;      // first x_{i-1} digit to SM_3
  localparam int unsigned COL_T0 = 5;              // first SM_3 result digit
  localparam int unsigned COL_T1 = K + 4;          // last SM_3 result digit

  typedef digit_t [N-1:0] dvec_t;          // element j-1 holds digit j
  typedef logic signed [K+1:0] acc_t;
  typedef logic signed [N:0] smp_t;        // sample times 2^N

  // Sign-magnitude digits of v / 2^N, |v| < 2^N.
  function automatic dvec_t to_digits(smp_t v);
    logic [N:0] mag;
    dvec_t d;
    mag = (v < 0) ? -v : v;
    for (int j = 1; j <= N; j++)
      d[j-1] = mag[N-j] ? ((v < 0) ? DIG_NEG : DIG_POS) : DIG_ZERO;
    return d;
  endfunction

  localparam smp_t  B_S   = smp_t'(B_Q);
  localparam smp_t  C_S   = smp_t'(C_Q);
  localparam smp_t  Y_MAX = smp_t'({1'b0, {N{1'b1}}});

  logic [TW-1:0] t_q;
  dvec_t xcur_q, x1_q, x2_q, y1_q, y2_q;
  acc_t  acc_q;
  dvec_t b_dig, c_dig;

  // Rounding and saturation of the collected result.
  acc_t  acc_rnd;
  smp_t  y_new;

  always_comb begin
    b_dig = to_digits(B_S);
    c_dig = to_digits(C_S);

    acc_rnd = (acc_q + acc_t'(2 ** (SH - 1))) >>> SH;
    if (acc_rnd > acc_t'(Y_MAX))       y_new = Y_MAX;
    else if (acc_rnd < -acc_t'(Y_MAX)) y_new = -Y_MAX;
    else                               y_new = smp_t'(acc_rnd);
  end

  // Operand streams and level resets, decoded from the frame cycle.
  always_comb begin
    sb1_x = DIG_ZERO;
    sb1_y = DIG_ZERO;
    sb2_x = DIG_ZERO;
    sb2_y = DIG_ZERO;
    ml1_y = DIG_ZERO;
    ml2_y = DIG_ZERO;
    sm1_y = DIG_ZERO;
    sm3_y = DIG_ZERO;
    y_out = DIG_ZERO;

    if (int'(t_q) < N) begin
      sb1_x = x_in;
      sb1_y = y2_q[t_q];
      sb2_x = x1_q[t_q];
      sb2_y = y1_q[t_q];
      y_out = y1_q[t_q];
    end
    if (int'(t_q) >= 1 && int'(t_q) <= N) begin
      ml1_y = b_dig[t_q - 1];
      ml2_y = c_dig[t_q - 1];
    end
    if (int'(t_q) >= SM1_T0 && int'(t_q) < SM1_T0 + N)
      sm1_y = x2_q[int'(t_q) - SM1_T0];
    if (int'(t_q) >= SM3_T0 && int'(t_q) < SM3_T0 + N)
      sm3_y = x1_q[int'(t_q) - SM3_T0];

    for (int l = 0; l < 5; l++)
      lvl_rst[l] = rst || !(int'(t_q) >= l && int'(t_q) < l + K);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t_q    <= '0;
      xcur_q <= '0;
      x1_q   <= '0;
      x2_q   <= '0;
      y1_q   <= '0;
      y2_q   <= '0;
      acc_q  <= '0;
    end else begin
      if (int'(t_q) < N)
        xcur_q[t_q] <= x_in;

      if (int'(t_q) >= COL_T0 && int'(t_q) <= COL_T1)
        acc_q <= (acc_q <<< 1) + acc_t'(dig_val(sm3_z));

      if (int'(t_q) == FRAME - 1) begin
        t_q   <= '0;
        acc_q <= '0;
        x2_q  <= x1_q;
        x1_q  <= xcur_q;
        y2_q  <= y1_q;
        y1_q  <= to_digits(y_new);
      end else begin
        t_q <= t_q + 1'b1;
      end
    end
  end

  initial begin
    assert (B_Q < (longint'(1) <<< N) && B_Q > -(longint'(1) <<< N)) else $error("sf_ctrl: |b| must be below 1");
    assert (C_Q < (longint'(1) <<< N) && C_Q > -(longint'(1) <<< N)) else $error("sf_ctrl: |c| must be below 1");
  end

endmodule
