// tb_ralu_swap: checks exponent comparison, saturated alignment distance,
// larger exponent and the swap crossbar (enabled and disabled) on random
// binary64 words, including subnormal and equal exponents.
module tb_ralu_swap;
  logic [63:0] a, b, greater, lesser;
  logic        do_swap, a_lt_b;
  logic [5:0]  shamt;
  logic [10:0] exp_big;
  int checks = 0, failures = 0;

  ralu_swap dut (.a, .b, .do_swap, .a_lt_b, .shamt, .exp_big, .greater, .lesser);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ea, eb, d;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      // bring exponents close together in most cases
      if (i % 4 != 0) b[62:52] = 11'(int'(a[62:52]) + int'($urandom % 80) - 40);
      if (i % 17 == 0) a[62:52] = '0;
      if (i % 19 == 0) b[62:52] = '0;
      do_swap = i[0];
      #1;
      ea = (a[62:52] == 0) ? 1 : int'(a[62:52]);
      eb = (b[62:52] == 0) ? 1 : int'(b[62:52]);
      d  = (ea > eb) ? ea - eb : eb - ea;
      if (d > 63) d = 63;
      checks++;
      if (a_lt_b !== (ea < eb) || shamt !== 6'(d) || exp_big !== 11'((ea > eb) ? ea : eb) ||
          greater !== (do_swap ? b : a) || lesser !== (do_swap ? a : b)) begin
        failures++;
        $display("FAIL a=%h b=%h sw=%b lt=%b sh=%0d(%0d) e=%0d", a, b, do_swap, a_lt_b, shamt, d, exp_big);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
