// ralu_adder: the 64-bit compound adder of the R-ALU.
//
// Computes, side by side, sum = a + b' and sum1 = a + b' + 1, with b' = b or
// ~b (inv_b), and the carry out of each. The two results share one
// generate/propagate network; sum1 only needs the extra carry-in. The
// floating-point path uses the pair to form |A - B| without a second
// addition: when the carry out of sum1 (cy1) is set, sum1 = A - B, else
// ~sum = B - A. Integer ADD takes sum, integer SUB takes sum1. The width is
// the design's 64 bits (extended from the 54 bits a binary64 adder needs).
// Combinational.
module ralu_adder
  import ralu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         inv_b,
  output logic [W-1:0] sum,
  output logic [W-1:0] sum1,
  output logic         cy0,
  output logic         cy1
);
  logic [W-1:0] bb, g, p;
  logic [W:0]   c0, c1;   // carries into each bit for carry-in 0 and 1

  assign bb = inv_b ? ~b : b;
  assign g  = a & bb;
  assign p  = a ^ bb;

  // Ripple form of the shared carry chains; synthesis maps these onto
  // its fast adder structures.
  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c0[i+1] = g[i] | (p[i] & c0[i]);
    assign c1[i+1] = g[i] | (p[i] & c1[i]);
  end

  assign sum  = p ^ c0[W-1:0];
  assign sum1 = p ^ c1[W-1:0];
  assign cy0  = c0[W];
  assign cy1  = c1[W];
endmodule
