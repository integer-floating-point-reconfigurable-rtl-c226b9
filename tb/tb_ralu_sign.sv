// tb_ralu_sign: exhaustive check of the result sign against a table derived
// from which operand has the larger magnitude.
module tb_ralu_sign;
  logic sign_a, sign_b, swapped, cy, mag_zero, sign, e;
  int checks = 0, failures = 0;

  ralu_sign dut (.sign_a, .sign_b, .swapped, .cy, .mag_zero, .sign);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {sign_a, sign_b, swapped, cy, mag_zero} = 5'(i);
      #1;
      // a is the larger magnitude when (not swapped and cy) or (swapped and not cy)
      if (sign_a == sign_b)  e = sign_a;
      else if (mag_zero)     e = 1'b0;
      else                   e = (swapped ^ cy) ? sign_a : sign_b;
      checks++;
      if (sign !== e) begin
        failures++;
        $display("FAIL in=%b sign=%b exp=%b", 5'(i), sign, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
