// ralu_normalize: stage 3 of FP-ADD (sel 1comp, SHIFT LEFT, exponent
// correction, rounding and packing).
//
// Significand format (64-bit word, as on the 64-bit datapath): bit 62 is the
// hidden one, bits 61..10 the 52 fraction bits, bits 9..1 guard bits and
// bit 0 a sticky bit; bit 63 catches the carry of an addition.
//
// sel 1comp: for an effective addition the magnitude is sum; for an
// effective subtraction it is sum1 (= A-B) when the carry cy is set, else
// ~sum (= B-A). The magnitude is then normalised so its leading one sits at
// bit 62. The left shifter moves it up by lz-1, lz being the predicted
// leading-zero count from the LOP register, but never below exponent 1,
// which yields subnormal results. The prediction is exact or one short, so
// the leading one now sits at bit 62, at bit 61 (one more left shift is
// made) or, after an addition that carried into bit 63, at bit 63 (one right
// shift is made; the lost bit joins the sticky bit). The exponent
// subtractor (the "A-B" box below the exponent registers) takes the net
// shift off the larger exponent. Rounding is to nearest, ties to even, on
// the 53-bit significand, with bit 9 as round bit and bits 8..0 as sticky;
// adding the increment to the packed exponent and fraction carries into
// the exponent on significand overflow and turns the largest finite
// number into infinity. NaN operands and inf + (-inf) give the quiet NaN
// 0x7FF8000000000000; one or two infinities of equal sign give that
// infinity. The design leaves rounding and special values out of its
// figure; how they are done here is this implementation's choice.
// Combinational.
module ralu_normalize
  import ralu_pkg::*;
(
  input  logic [XLEN-1:0]  sum,
  input  logic [XLEN-1:0]  sum1,
  input  logic             cy,
  input  logic             eff_sub,
  input  logic [SHW:0]     lz,
  input  logic [EXP_W-1:0] exp_big,
  input  logic             sign,
  input  logic             is_nan,
  input  logic             is_inf,
  input  logic             inf_sign,
  output logic [XLEN-1:0]  result
);
  logic [XLEN-1:0]  mag, shl, n;
  logic [SHW-1:0]   ls;
  logic [EXP_W:0]   e_res;
  logic [SHW:0]     lzm1;
  logic [EXP_W:0]   emax_shift;
  logic             rnd, unused_sticky;
  logic [62:0]      body;

  // sel 1comp
  assign mag = !eff_sub ? sum : (cy ? sum1 : ~sum);

  // Left shift amount: lz-1, limited so the exponent stays >= 1.
  assign lzm1       = (lz == '0) ? '0 : lz - 1'b1;
  assign emax_shift = {1'b0, exp_big} - 1'b1;
  assign ls = ((EXP_W+1)'(lzm1) > emax_shift) ? emax_shift[SHW-1:0] : lzm1[SHW-1:0];

  ralu_barrel_shifter #(.W(XLEN)) u_shift_left (
    .d(mag), .amt(ls), .left(1'b1), .y(shl), .sticky(unused_sticky)
  );

  // one-position correction of the prediction
  always_comb begin
    if (shl[XLEN-1]) begin
      n     = {1'b0, shl[XLEN-1:1]};
      n[0]  = shl[1] | shl[0];
      e_res = {1'b0, exp_big} - (EXP_W+1)'(ls) + 1'b1;
    end else if (!shl[62] && (EXP_W+1)'(ls) < emax_shift) begin
      n     = {shl[XLEN-2:0], 1'b0};
      e_res = {1'b0, exp_big} - (EXP_W+1)'(ls) - 1'b1;
    end else begin
      n     = shl;
      e_res = shl[62] ? {1'b0, exp_big} - (EXP_W+1)'(ls) : '0;
    end
  end

  assign rnd  = n[9] & ((|n[8:0]) | n[10]);
  assign body = {e_res[EXP_W-1:0], n[61:10]} + 63'(rnd);

  always_comb begin
    if (is_nan)
      result = FP_QNAN;
    else if (is_inf)
      result = {inf_sign, 11'h7FF, 52'd0};
    else if (mag == '0)
      result = {sign, 63'd0};
    else if (e_res >= (EXP_W+1)'(12'h7FF) || body[62:52] == 11'h7FF)
      result = {sign, 11'h7FF, 52'd0};
    else
      result = {sign, body};
  end
endmodule
