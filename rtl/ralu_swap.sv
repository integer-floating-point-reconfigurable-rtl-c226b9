// ralu_swap: exponent comparison and operand swap, stage 1 of FP-ADD.
//
// Two exponent subtractors compute A-B and B-A side by side; the sign of A-B
// (a_lt_b) picks the non-negative difference as the alignment shift amount
// and the larger exponent as the result exponent. The SWAP crossbar routes
// the operand with the larger exponent to greater and the other to lesser when
// do_swap is set. do_swap arrives through programmable switch RS1a, which
// ties it to 0 in integer mode so that B1 reaches the barrel shifter
// unchanged. Subnormal operands (exponent field 0) count with exponent 1,
// as IEEE 754 defines them. The shift amount is saturated at 63: the
// significand occupies bits 62..0 of the shifter word, so any larger
// distance already moves it entirely into the sticky bit. This saturation
// and the subnormal handling are this implementation's choices.
// Combinational.
module ralu_swap
  import ralu_pkg::*;
(
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  input  logic             do_swap,
  output logic             a_lt_b,
  output logic [SHW-1:0]   shamt,
  output logic [EXP_W-1:0] exp_big,
  output logic [XLEN-1:0]  greater,
  output logic [XLEN-1:0]  lesser
);
  logic [EXP_W-1:0] ea, eb;
  logic [EXP_W:0]   d_ab, d_ba, d;

  assign ea = (a[62:52] == '0) ? EXP_W'(1) : a[62:52];
  assign eb = (b[62:52] == '0) ? EXP_W'(1) : b[62:52];

  assign d_ab   = {1'b0, ea} - {1'b0, eb};
  assign d_ba   = {1'b0, eb} - {1'b0, ea};
  assign a_lt_b = d_ab[EXP_W];
  assign d      = a_lt_b ? d_ba : d_ab;
  assign shamt  = (d > (EXP_W+1)'(XLEN-1)) ? SHW'(XLEN-1) : d[SHW-1:0];
  assign exp_big = a_lt_b ? eb : ea;

  assign greater   = do_swap ? b : a;
  assign lesser = do_swap ? a : b;
endmodule
