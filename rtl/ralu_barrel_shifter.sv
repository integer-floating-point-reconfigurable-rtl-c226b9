// ralu_barrel_shifter: 64-bit logarithmic barrel shifter.
//
// Shifts d left or right (logical, zero fill) by amt, in six stages of
// 1, 2, 4, 8, 16 and 32 positions. The design uses one such shifter in
// stage 1 for both integer SLL/SRL and the alignment (right shift) of the
// smaller floating-point significand, and a left shifter in stage 3 to
// normalise the sum. sticky is the OR of every bit shifted out of the word;
// the floating-point path uses it for rounding (rounding is not drawn in the
// design, so this output is this implementation's addition).
// Combinational.
module ralu_barrel_shifter
  import ralu_pkg::*;
#(
  parameter int unsigned W  = XLEN,
  parameter int unsigned AW = $clog2(W)
) (
  input  logic [W-1:0]  d,
  input  logic [AW-1:0] amt,
  input  logic          left,
  output logic [W-1:0]  y,
  output logic          sticky
);
  logic [W-1:0] stage [AW+1];
  logic [AW:0]  lost;

  assign stage[0] = d;
  assign lost[0]  = 1'b0;

  for (genvar s = 0; s < AW; s++) begin : g_stage
    localparam int unsigned SH = 1 << s;
    logic [W-1:0] shl, shr;
    assign shl = stage[s] << SH;
    assign shr = stage[s] >> SH;
    assign stage[s+1] = amt[s] ? (left ? shl : shr) : stage[s];
    // Bits leaving the word in this stage.
    assign lost[s+1] = lost[s] |
                       (amt[s] & (left ? |stage[s][W-1 -: SH] : |stage[s][SH-1:0]));
  end

  assign y      = stage[AW];
  assign sticky = lost[AW];
endmodule
