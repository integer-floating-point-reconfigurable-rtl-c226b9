// tb_ralu_logic_unit: checks AND/OR/XOR/NOR of the logic unit on random and
// corner operands against SystemVerilog's own bitwise operators.
module tb_ralu_logic_unit;
  import ralu_pkg::*;
  logic [63:0] a, b, y, exp_y;
  logic_op_e   op;
  int checks = 0, failures = 0;

  ralu_logic_unit dut (.a, .b, .op, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a  = (i < 4) ? {64{i[0]}} : {$urandom, $urandom};
      b  = (i < 4) ? {64{i[1]}} : {$urandom, $urandom};
      op = logic_op_e'(i % 4);
      #1;
      case (op)
        LOG_AND: exp_y = a & b;
        LOG_OR:  exp_y = a | b;
        LOG_XOR: exp_y = a ^ b;
        default: exp_y = ~(a | b);
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
