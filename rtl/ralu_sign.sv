// ralu_sign: sign of the floating-point sum (the SIGN box of stage 3).
//
// The result takes the sign of the operand with the larger exponent
// (sign_a, or sign_b when the operands were swapped). In an effective
// subtraction a clear carry cy from the sum+1 adder output means the
// smaller-exponent operand had the larger significand, so the sign flips.
// An exact zero from an effective subtraction is +0 (round to nearest); the
// sum of two zeros of equal sign keeps that sign. The design shows only the
// two operand signs and CY entering this box; the swap flag and zero flag
// are this implementation's additions. Combinational.
module ralu_sign (
  input  logic sign_a,
  input  logic sign_b,
  input  logic swapped,
  input  logic cy,
  input  logic mag_zero,
  output logic sign
);
  logic eff_sub, big_sign;
  assign eff_sub  = sign_a ^ sign_b;
  assign big_sign = swapped ? sign_b : sign_a;
  always_comb begin
    if (!eff_sub)      sign = big_sign;
    else if (mag_zero) sign = 1'b0;
    else               sign = big_sign ^ ~cy;
  end
endmodule
