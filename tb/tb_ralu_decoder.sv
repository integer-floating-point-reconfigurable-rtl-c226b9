// tb_ralu_decoder: checks the decoded class, integer output select, logic
// function, subtract and shift-direction controls of every operation.
module tb_ralu_decoder;
  import ralu_pkg::*;
  op_e   op;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ralu_decoder dut (.op, .ctrl);

  task automatic expect_ctrl(op_e o, cls_e c, int_sel_e s, logic_op_e l, logic sub, logic sl);
    op = o;
    #1;
    checks++;
    if (ctrl.cls !== c || ctrl.int_sel !== s || (s == ISEL_LOGIC && ctrl.log_op !== l) ||
        ctrl.sub !== sub || ctrl.shift_left !== sl) begin
      failures++;
      $display("FAIL op=%0d ctrl=%p", o, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_ctrl(OP_ADD,   CLS_ADD,   ISEL_ADDER,   LOG_AND, 0, 0);
    expect_ctrl(OP_SUB,   CLS_ADD,   ISEL_ADDER,   LOG_AND, 1, 0);
    expect_ctrl(OP_SLL,   CLS_SHIFT, ISEL_SHIFTER, LOG_AND, 0, 1);
    expect_ctrl(OP_SRL,   CLS_SHIFT, ISEL_SHIFTER, LOG_AND, 0, 0);
    expect_ctrl(OP_AND,   CLS_LOG,   ISEL_LOGIC,   LOG_AND, 0, 0);
    expect_ctrl(OP_OR,    CLS_LOG,   ISEL_LOGIC,   LOG_OR,  0, 0);
    expect_ctrl(OP_XOR,   CLS_LOG,   ISEL_LOGIC,   LOG_XOR, 0, 0);
    expect_ctrl(OP_NOR,   CLS_LOG,   ISEL_LOGIC,   LOG_NOR, 0, 0);
    op = OP_FPADD;
    #1;
    checks++;
    if (ctrl.cls !== CLS_FPADD) begin failures++; $display("FAIL fpadd class"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
