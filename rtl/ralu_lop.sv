// ralu_lop: leading-one predictor (LOP) of the FP-ADD significand sum.
//
// Works from the two adder operands a and b (b already inverted for an
// effective subtraction), in parallel with the addition, so the
// normalisation distance is known as soon as the sum. Every bit position i
// gets an indicator
//   f[i] = t[i+1] ? (g[i] & ~z[i-1]) | (z[i] & ~g[i-1])
//                 : (z[i] & ~z[i-1]) | (g[i] & ~g[i-1])
// with t = a ^ b, g = a & b, z = ~a & ~b; the leading one of f marks the
// leading significant digit of the result, or the digit just above it.
// lz, the number of zeros above the leading one of f, is therefore either
// the exact leading-zero count of the result magnitude or one less; the
// normaliser of stage 3 makes the final one-position correction. A
// priority encoder (a scan from the least to the most significant bit,
// which synthesis turns into a tree) counts the zeros of f.
// zero flags a zero result, also without waiting for the sum: for an
// effective subtraction (sub) the operands then complement each other
// exactly (A = B), for an addition both are zero.
// The design names the LOP and places it beside the adder in stage 2; the
// indicator equations are the standard ones from the literature on leading
// zero anticipation, chosen by this implementation. Combinational.
module ralu_lop
  import ralu_pkg::*;
#(
  parameter int unsigned W  = XLEN,
  parameter int unsigned CW = $clog2(W) + 1
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          sub,
  output logic [CW-1:0] lz,
  output logic          zero
);
  logic [W-1:0] t, g, z, f;
  assign t = a ^ b;
  assign g = a & b;
  assign z = ~a & ~b;

  for (genvar i = 0; i < W; i++) begin : g_ind
    logic tp, gm, zm;
    assign tp = (i == W - 1) ? 1'b0 : t[(i == W - 1) ? i : i + 1];
    assign gm = (i == 0) ? 1'b0 : g[(i == 0) ? 0 : i - 1];
    assign zm = (i == 0) ? 1'b1 : z[(i == 0) ? 0 : i - 1];
    assign f[i] = tp ? ((g[i] & ~zm) | (z[i] & ~gm))
                     : ((z[i] & ~zm) | (g[i] & ~gm));
  end

  always_comb begin
    lz = CW'(W);
    for (int i = 0; i < W; i++)
      if (f[i]) lz = CW'(W - 1 - i);
  end

  assign zero = sub ? (&t) : ~(|(a | b));
endmodule
