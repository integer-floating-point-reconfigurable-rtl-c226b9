// tb_ralu_lop: checks the leading-one predictor on significand pairs laid
// out as in the FP datapath (hidden bit at 62, guard bits, sticky bit 0),
// aligned by random distances, for effective additions and subtractions
// including near and exact cancellation. The predicted count must equal the
// exact leading-zero count of the result magnitude or be one less, and the
// zero flag must be set exactly when the magnitude is zero.
module tb_ralu_lop;
  logic [63:0] a, b;
  logic        sub, zero;
  logic [6:0]  lz;
  int checks = 0, failures = 0, n_exact = 0, n_short = 0, n_zero = 0;

  ralu_lop dut (.a, .b, .sub, .lz, .zero);

  function automatic int lzc(logic [63:0] v);
    for (int i = 63; i >= 0; i--) if (v[i]) return 63 - i;
    return 64;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] x, y, mag, t;
      logic [127:0] w;
      int d, tl;
      x = {1'b0, 1'b1, 20'($urandom), 32'($urandom), 10'd0};
      y = {1'b0, 1'b1, 20'($urandom), 32'($urandom), 10'd0};
      if (n % 3 == 0) begin
        // share a random number of leading fraction bits
        logic [63:0] keep;
        keep = ~(64'hFFFF_FFFF_FFFF_FFFF >> (2 + $urandom % 50));
        y = (x & keep) | (y & ~keep);
      end
      if (n % 5 == 0) x[62] = 1'b0;            // subnormal operand
      if (n % 11 == 0) y = x;                  // exact cancellation
      d = (n % 2 == 0) ? $urandom % 3 : $urandom % 70;
      if (n % 11 == 0) d = 0;
      w = {y, 64'd0} >> d;
      y = w[127:64];
      y[0] = y[0] | (w[63:0] != 0);
      sub = (n % 4 != 1);
      if (d > 0 && x < y) begin t = x; x = y; y = t; end
      a = x;
      b = sub ? ~y : y;
      #1;
      mag = !sub ? x + y : (x >= y ? x - y : y - x);
      tl = lzc(mag);
      checks++;
      if (zero !== (mag == 0) || (mag != 0 && !(int'(lz) == tl || int'(lz) == tl - 1))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h sub=%b lz=%0d true=%0d zero=%b", x, y, sub, lz, tl, zero);
      end
      if (mag == 0) n_zero++;
      else if (int'(lz) == tl) n_exact++;
      else n_short++;
    end
    // both outcomes of the prediction must have occurred
    checks++;
    if (n_exact == 0 || n_short == 0 || n_zero == 0) failures++;
    $display("exact %0d, one short %0d, zero %0d", n_exact, n_short, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
