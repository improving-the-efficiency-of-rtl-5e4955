// On-line computing block: digit-serial adder, subtractor or multiplier.
//
// Operands arrive one radix-2 signed digit per clock, most significant digit
// first (x_1, x_2, ... standing for X = sum x_j 2^-j), and the block emits one
// result digit z per clock, so a chain of such blocks works on all its
// operations at once, each a few cycles behind the one feeding it. Only two
// wires per operand and per result are needed whatever the word length; the
// inside of the block is a parallel datapath of word width.
//
// Step i of the recurrence:
//   N_i = 2 R_{i-1} + F_i
//   z_i = +1 if N_i >= 1/2, -1 if N_i < -1/2, else 0
//   R_i = N_i - z_i
// with the increment F_i
//   add/sub:  F_i = 2^-p (x_i +/- y_i)
//   multiply: F_i = 2^-p (x_i Y_i + y_i X_{i-1})
// where X_i, Y_i are the operand prefixes received so far. Summed over the
// steps, sum z_j 2^-j = 2^-p op(X, Y) - 2^-k R_k with |R_k| <= 1/2, so the
// result is the operation scaled by 2^-p, the on-line delay: the value of
// result digit z_j belongs to position j - p of op(X, Y). The recurrence, the
// selection thresholds and the two increments follow the published method;
// the fixed-point widths, the digit code (see olf_pkg), the reset and the
// registered output are choices of this design.
//
// Interface and timing:
//   rst  synchronous, active high. While high the block is cleared
//        (R = 0, X = Y = 0) and z is 0. The first clock edge with rst low
//        takes digit 1 of both operands.
//   xi, yi   operand digits; digit i is sampled at the i-th edge after rst
//        falls.
//   zi   registered result digit; z_i is on zi right after the edge that took
//        x_i and y_i, so a following block is released one cycle later.
// Parameters: OP (operation), P (on-line delay, 2 or more keeps |F| <= 1/2),
// K (digits per operand and result that are computed exactly; the
// datapath carries K + P fraction bits).
module ml_sm_sb
  import olf_pkg::*;
#(
  parameter op_e         OP = OP_ADD,
  parameter int unsigned P  = 2,
  parameter int unsigned K  = 22
) (
  input  logic   clk,
  input  logic   rst,
  input  digit_t xi,
  input  digit_t yi,
  output digit_t zi
);

  // Fixed point: FRAC fraction bits, a sign bit and two integer bits.
  localparam int unsigned FRAC = K + P;
  localparam int unsigned W    = FRAC + 3;
  typedef logic signed [W-1:0] fix_t;

  localparam fix_t ONE  = fix_t'(1) <<< FRAC;
  localparam fix_t HALF = fix_t'(1) <<< (FRAC - 1);

  fix_t r_q;        // residual R_{i-1}
  fix_t xp_q;       // X_{i-1}
  fix_t yp_q;       // Y_{i-1}
  fix_t wt_q;       // weight 2^-i of the digit now on the inputs

  logic signed [1:0] xd, yd, zd;
  fix_t x_now, y_now;   // X_i, Y_i
  fix_t mac;            // x_i Y_i + y_i X_{i-1}
  fix_t incr;           // F_i
  fix_t nv;             // N_i
  fix_t r_next;         // R_i

  always_comb begin
    xd = dig_val(xi);
    yd = dig_val(yi);

    // Prefix update X_i = X_{i-1} + x_i 2^-i (and likewise Y).
    x_now = xp_q;
    y_now = yp_q;
    if (xd > 0)      x_now = xp_q + wt_q;
    else if (xd < 0) x_now = xp_q - wt_q;
    if (yd > 0)      y_now = yp_q + wt_q;
    else if (yd < 0) y_now = yp_q - wt_q;

    // x_i * Y_i + y_i * X_{i-1}; the digits only select +, - or nothing.
    mac = '0;
    if (xd > 0)      mac = mac + y_now;
    else if (xd < 0) mac = mac - y_now;
    if (yd > 0)      mac = mac + xp_q;
    else if (yd < 0) mac = mac - xp_q;

    // The 2^-p scaling. Y_i has at most K fraction bits, so the shift of the
    // product term drops nothing.
    unique case (OP)
      OP_ADD:  incr = (fix_t'(xd) + fix_t'(yd)) <<< (FRAC - P);
      OP_SUB:  incr = (fix_t'(xd) - fix_t'(yd)) <<< (FRAC - P);
      default: incr = mac >>> P;
    endcase

    nv = (r_q <<< 1) + incr;

    if (nv >= HALF)       zd = 2'sd1;
    else if (nv < -HALF)  zd = -2'sd1;
    else                  zd = 2'sd0;

    if (zd > 0)      r_next = nv - ONE;
    else if (zd < 0) r_next = nv + ONE;
    else             r_next = nv;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r_q  <= '0;
      xp_q <= '0;
      yp_q <= '0;
      wt_q <= HALF;
      zi   <= DIG_ZERO;
    end else begin
      r_q  <= r_next;
      xp_q <= x_now;
      yp_q <= y_now;
      wt_q <= wt_q >>> 1;
      zi   <= dig_enc(zd);
    end
  end

  // The residual stays within [-1/2, 1/2] as long as |F| <= 1/2.
  a_residual_bounded : assert property (@(posedge clk) disable iff (rst)
    (r_q <= HALF) && (r_q >= -HALF))
    else $error("ml_sm_sb: residual out of range");

  // 2'b10 is not a digit code.
  a_digit_codes : assert property (@(posedge clk) disable iff (rst)
    (xi != 2'b10) && (yi != 2'b10))
    else $error("ml_sm_sb: invalid digit code");

  initial begin
    assert (P >= 2) else $error("ml_sm_sb: P must be at least 2");
  end

endmodule
