// tb_ralu_barrel_shifter: checks left and right shifts of every distance,
// and the sticky output (OR of the bits shifted out), against the shift
// operators on random words.
module tb_ralu_barrel_shifter;
  logic [63:0] d, y, exp_y, mask;
  logic [5:0]  amt;
  logic        left, sticky, exp_st;
  int checks = 0, failures = 0;

  ralu_barrel_shifter dut (.d, .amt, .left, .y, .sticky);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      d    = (i % 7 == 0) ? (64'd1 << ($urandom % 64)) : {$urandom, $urandom};
      amt  = 6'(i % 64);
      left = i[6];
      #1;
      if (left) begin
        exp_y  = d << amt;
        exp_st = (amt != 0) && ((d >> (64 - int'(amt))) != 0);
      end else begin
        exp_y  = d >> amt;
        mask   = (64'd1 << amt) - 64'd1;
        exp_st = (d & mask) != 0;
      end
      checks++;
      if (y !== exp_y || sticky !== exp_st) begin
        failures++;
        $display("FAIL d=%h amt=%0d left=%b y=%h/%h st=%b/%b", d, amt, left, y, exp_y, sticky, exp_st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
