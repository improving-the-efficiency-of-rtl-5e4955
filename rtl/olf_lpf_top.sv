// Recursive digital low-pass filter computed in on-line mode.
//
//   y_i = b (x_i - y_{i-2}) + c (x_{i-1} - y_{i-1}) + x_{i-2} + x_{i-1}
//
// Samples enter and leave as serial streams of radix-2 signed digits, two
// wires each, most significant digit first, so the pin count does not depend
// on the word length. The formula is split into a tree of dependent
// operations, each done by an on-line computing block (ml_sm_sb) that starts
// emitting result digits while its operand digits are still arriving:
//
//   level 1  SB_1 = x_i - y_{i-2}          SB_2 = x_{i-1} - y_{i-1}
//   level 2  ML_1 = SB_1 * b               ML_2 = SB_2 * c
//   level 3  SM_2 = ML_1 + ML_2
//   level 4  SM_1 = SM_2 + x_{i-2}
//   level 5  SM_3 = SM_1 + x_{i-1}         (= y_i)
//
// Each level lags the one below by a single clock, so the whole chain
// finishes a sample in K + 6 clocks, K = N + 5P + 2 being the digits each
// block produces, instead of five block times one after another. The
// sequencer sf_ctrl counts the frame, releases the level resets, stores the
// past samples, replays them and the coefficients as digit streams, and turns
// the final stream back into a stored N-digit sample.
//
// Ports (clk, rst, x_in, y_out: six wires in all):
//   rst    synchronous, active high; clears the past samples. The first
//          frame starts in the first cycle with rst low.
//   x_in   digit j of x_i in frame cycle j-1, j = 1..N (code: olf_pkg).
//   y_out  digit j of y_i in cycle j-1 of the frame after the one that took
//          x_i; 0 in the other cycles.
// Parameters: N digits per sample, P on-line delay, B_Q and C_Q the
// coefficients b and c times 2^N (|b|, |c| < 1). Outputs beyond the range of
// an N-digit fraction are saturated to +/-(1 - 2^-N).
// The operation tree and the block structure follow the published design;
// the frame timing, the digit code and the number formats are choices of
// this design (see sf_ctrl).
module olf_lpf_top
  import olf_pkg::*;
#(
  parameter int unsigned N   = 10,
  parameter int unsigned P   = 2,
  parameter longint      B_Q = longint'(1) <<< (N - 2),
  parameter longint      C_Q = longint'(1) <<< (N - 1)
) (
  input  logic   clk,
  input  logic   rst,
  input  digit_t x_in,
  output digit_t y_out
);

  localparam int unsigned K = steps_per_block(N, P);

  logic [4:0] lvl_rst;
  digit_t sb1_x, sb1_y, sb2_x, sb2_y, ml1_y, ml2_y, sm1_y, sm3_y;
  digit_t sb1_z, sb2_z, ml1_z, ml2_z, sm2_z, sm1_z, sm3_z;

  sf_ctrl #(.N(N), .P(P), .B_Q(B_Q), .C_Q(C_Q)) u_sf (
    .clk, .rst, .x_in, .y_out, .lvl_rst,
    .sb1_x, .sb1_y, .sb2_x, .sb2_y, .ml1_y, .ml2_y, .sm1_y, .sm3_y,
    .sm3_z
  );

  // Level 1: the two differences.
  ml_sm_sb #(.OP(OP_SUB), .P(P), .K(K)) u_sb_1 (
    .clk, .rst(lvl_rst[0]), .xi(sb1_x), .yi(sb1_y), .zi(sb1_z));
  ml_sm_sb #(.OP(OP_SUB), .P(P), .K(K)) u_sb_2 (
    .clk, .rst(lvl_rst[0]), .xi(sb2_x), .yi(sb2_y), .zi(sb2_z));

  // Level 2: the coefficient products.
  ml_sm_sb #(.OP(OP_MUL), .P(P), .K(K)) u_ml_1 (
    .clk, .rst(lvl_rst[1]), .xi(sb1_z), .yi(ml1_y), .zi(ml1_z));
  ml_sm_sb #(.OP(OP_MUL), .P(P), .K(K)) u_ml_2 (
    .clk, .rst(lvl_rst[1]), .xi(sb2_z), .yi(ml2_y), .zi(ml2_z));

  // Level 3: sum of the products.
  ml_sm_sb #(.OP(OP_ADD), .P(P), .K(K)) u_sm_2 (
    .clk, .rst(lvl_rst[2]), .xi(ml1_z), .yi(ml2_z), .zi(sm2_z));

  // Level 4: + x_{i-2}.
  ml_sm_sb #(.OP(OP_ADD), .P(P), .K(K)) u_sm_1 (
    .clk, .rst(lvl_rst[3]), .xi(sm2_z), .yi(sm1_y), .zi(sm1_z));

  // Level 5: + x_{i-1}, the filter output.
  ml_sm_sb #(.OP(OP_ADD), .P(P), .K(K)) u_sm_3 (
    .clk, .rst(lvl_rst[4]), .xi(sm1_z), .yi(sm3_y), .zi(sm3_z));

endmodule
