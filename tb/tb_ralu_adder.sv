// tb_ralu_adder: checks sum, sum+1 and both carries of the compound adder,
// with and without inversion of b, against 65-bit additions.
module tb_ralu_adder;
  logic [63:0] a, b, sum, sum1;
  logic        inv_b, cy0, cy1;
  logic [64:0] e0, e1;
  int checks = 0, failures = 0;

  ralu_adder dut (.a, .b, .inv_b, .sum, .sum1, .cy0, .cy1);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = {$urandom, $urandom};
      b = (i % 5 == 0) ? a : {$urandom, $urandom};
      if (i % 11 == 0) b = ~a;
      if (i % 13 == 0) a = '1;
      inv_b = i[0];
      #1;
      e0 = {1'b0, a} + {1'b0, (inv_b ? ~b : b)};
      e1 = e0 + 65'd1;
      checks++;
      if ({cy0, sum} !== e0 || {cy1, sum1} !== e1) begin
        failures++;
        $display("FAIL a=%h b=%h inv=%b sum=%h sum1=%h", a, b, inv_b, sum, sum1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
