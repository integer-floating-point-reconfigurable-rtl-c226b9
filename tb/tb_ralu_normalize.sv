// tb_ralu_normalize: checks the last FP-ADD stage. For random binary64
// operand pairs the testbench forms the stage-3 inputs itself (aligned
// significands with guard and sticky bits, sum, sum+1, carry, leading-zero
// count, exact or one short as the predictor may give it, larger exponent and sign) with plain arithmetic, and compares the
// packed result with the host's double-precision addition (round to
// nearest even). Operand classes cover cancellation, carries, rounding
// ties, subnormals, overflow and special values.
module tb_ralu_normalize;
  import ralu_pkg::*;
  logic [63:0] sum, sum1, result, x, y, expv;
  logic        cy, eff_sub, sign, is_nan, is_inf, inf_sign;
  logic [6:0]  lz;
  logic [10:0] exp_big;
  int checks = 0, failures = 0, n_short = 0;

  ralu_normalize dut (.sum, .sum1, .cy, .eff_sub, .lz, .exp_big, .sign, .is_nan, .is_inf,
                      .inf_sign, .result);

  function automatic logic [63:0] rand_fp(int cls);
    logic [63:0] w;
    w = {$urandom, $urandom};
    case (cls)
      0: w[62:52] = 11'($urandom % 6);              // subnormal / tiny
      1: w[62:52] = 11'(2040 + $urandom % 7);       // near overflow
      2: w[62:52] = 11'(1000 + $urandom % 40);
      default: ;
    endcase
    if (w[62:52] == 11'h7FF) w[62:52] = 11'h7FE;
    return w;
  endfunction

  function automatic logic is_nan_w(logic [63:0] w);
    return w[62:52] == 11'h7FF && w[51:0] != 0;
  endfunction

  // Reference front end: stage 1 and 2 in plain arithmetic.
  task automatic drive(logic [63:0] p, logic [63:0] q);
    int          ep, eq, d;
    logic [63:0] gp, gq, al, mag;
    logic [127:0] wide;
    logic        st, sw, pinf, qinf, pnan, qnan;
    ep = (p[62:52] == 0) ? 1 : int'(p[62:52]);
    eq = (q[62:52] == 0) ? 1 : int'(q[62:52]);
    sw = eq > ep;
    if (sw) begin logic [63:0] t; t = p; p = q; q = t; begin int te; te = ep; ep = eq; eq = te; end end
    gp = {1'b0, p[62:52] != 0, p[51:0], 10'd0};
    gq = {1'b0, q[62:52] != 0, q[51:0], 10'd0};
    d  = ep - eq;
    wide = {gq, 64'd0} >> d;
    al = wide[127:64];
    st = wide[63:0] != 0 || al[0];
    al[0] = st;
    eff_sub = p[63] ^ q[63];
    {cy, sum1} = {1'b0, gp} + {1'b0, (eff_sub ? ~al : al)} + 65'd1;
    sum = sum1 - 64'd1;
    if (!eff_sub) cy = 1'b0;
    mag = !eff_sub ? gp + al : (gp >= al ? gp - al : al - gp);
    lz = 7'd64;
    for (int k = 0; k < 64; k++) if (mag[k]) lz = 7'(63 - k);
    // the leading-one prediction may be one short
    if (lz != 0 && lz != 64 && $urandom % 2 == 0) begin lz = lz - 7'd1; n_short++; end
    exp_big = 11'(ep);
    if (!eff_sub) sign = p[63];
    else if (mag == 0) sign = 1'b0;
    else sign = (gp >= al) ? p[63] : q[63];
    pnan = is_nan_w(p); qnan = is_nan_w(q);
    pinf = p[62:52] == 11'h7FF && !pnan;
    qinf = q[62:52] == 11'h7FF && !qnan;
    is_nan = pnan || qnan || (pinf && qinf && p[63] != q[63]);
    is_inf = pinf || qinf;
    inf_sign = pinf ? p[63] : q[63];
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      x = rand_fp(i % 5);
      y = rand_fp((i / 5) % 5);
      case (i % 9)
        0: y = {~x[63], x[62:0]};                       // exact cancellation
        1: begin y = x; y[63] = ~x[63]; y[3:0] = 4'($urandom); end  // near cancellation
        2: begin y[62:52] = x[62:52] - 11'($urandom % 3); y[63] = ~x[63]; end
        3: y[62:52] = x[62:52] - 11'(53 + $urandom % 3); // rounding ties region
        default: ;
      endcase
      if (i == 10) begin x = 64'h7FF0_0000_0000_0000; y = 64'hFFF0_0000_0000_0000; end
      if (i == 11) begin x = 64'h7FF0_0000_0000_0000; y = 64'h3FF0_0000_0000_0000; end
      if (i == 12) begin x = 64'h7FF0_0000_0000_0001; y = 64'h3FF0_0000_0000_0000; end
      if (i == 13) begin x = 64'h8000_0000_0000_0000; y = 64'h8000_0000_0000_0000; end
      if (i == 14) begin x = 64'h7FEF_FFFF_FFFF_FFFF; y = 64'h7FEF_FFFF_FFFF_FFFF; end
      drive(x, y);
      #1;
      expv = $realtobits($bitstoreal(x) + $bitstoreal(y));
      if (is_nan_w(expv)) expv = FP_QNAN;
      checks++;
      if (result !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h got=%h exp=%h", x, y, result, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
