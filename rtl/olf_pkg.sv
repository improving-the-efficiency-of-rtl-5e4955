// Shared types and helpers for the on-line (digit-serial, most significant
// digit first) filter.
//
// Numbers travel between blocks as radix-2 signed digits in {-1, 0, +1}, one
// digit per clock, most significant first. A stream d_1, d_2, ... stands for
// the fraction sum d_j * 2^-j. Each digit is carried on two wires, as in the
// 2-bit serial ports of the computing blocks; the code used here is the
// two's complement value of the digit: 2'b00 = 0, 2'b01 = +1, 2'b11 = -1.
// The code 2'b10 is never produced and is read as 0.
package olf_pkg;

  typedef logic [1:0] digit_t;

  localparam digit_t DIG_ZERO = 2'b00;
  localparam digit_t DIG_POS  = 2'b01;
  localparam digit_t DIG_NEG  = 2'b11;

  // Operation performed by one computing block.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,   // z = 2^-p (x + y)
    OP_SUB = 2'd1,   // z = 2^-p (x - y)
    OP_MUL = 2'd2    // z = 2^-p (x * y)
  } op_e;

  // Digit code to its value -1, 0 or +1.
  function automatic logic signed [1:0] dig_val(digit_t d);
    unique case (d)
      DIG_POS: return 2'sd1;
      DIG_NEG: return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

  // Value -1, 0 or +1 to its digit code.
  function automatic digit_t dig_enc(logic signed [1:0] v);
    if (v > 0)      return DIG_POS;
    else if (v < 0) return DIG_NEG;
    else            return DIG_ZERO;
  endfunction

  // Number of steps every computing block of the filter runs per sample:
  // the n input digits, p digits of growth for each of the five levels of
  // the operation chain, and two guard digits.
  function automatic int unsigned steps_per_block(int unsigned n, int unsigned p);
    return n + 5 * p + 2;
  endfunction

  // Clock cycles in one sample frame: the five levels start one cycle apart,
  // the last result digit is collected, and one cycle stores the new sample.
  function automatic int unsigned frame_cycles(int unsigned n, int unsigned p);
    return steps_per_block(n, p) + 6;
  endfunction

endpackage
