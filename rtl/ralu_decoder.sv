// ralu_decoder: instruction decoder of the R-ALU.
//
// Turns an operation code into the controls the datapath needs: the
// instruction class used by the reconfiguration rules, which unit drives
// the integer output port, the logic-unit function, the adder's subtract
// control and the barrel shifter direction. The design draws the decoder as
// the "instructions" box feeding switch RS1b, the logic unit, the adder and
// the output drivers; the encoding is this implementation's.
// Combinational.
module ralu_decoder
  import ralu_pkg::*;
(
  input  op_e   op,
  output ctrl_t ctrl
);
  always_comb begin
    ctrl            = '0;
    ctrl.cls        = op_class(op);
    ctrl.int_sel    = ISEL_LOGIC;
    ctrl.log_op     = LOG_AND;
    case (op)
      OP_ADD:   ctrl.int_sel = ISEL_ADDER;
      OP_SUB:   begin ctrl.int_sel = ISEL_ADDER; ctrl.sub = 1'b1; end
      OP_SLL:   begin ctrl.int_sel = ISEL_SHIFTER; ctrl.shift_left = 1'b1; end
      OP_SRL:   ctrl.int_sel = ISEL_SHIFTER;
      OP_AND:   ctrl.log_op = LOG_AND;
      OP_OR:    ctrl.log_op = LOG_OR;
      OP_XOR:   ctrl.log_op = LOG_XOR;
      OP_NOR:   ctrl.log_op = LOG_NOR;
      default:  ;
    endcase
  end
endmodule
