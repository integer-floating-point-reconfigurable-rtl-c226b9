// ralu_logic_unit: the 64-bit logic unit of the R-ALU.
//
// Bitwise AND, OR, XOR and NOR of the two stage-1 operands A1 and B1, chosen
// by the instruction decoder. It is purely combinational: the result is
// ready in the same cycle the operands sit in the stage-1 registers, which
// gives logic operations their one-cycle latency. The unit takes no part in
// floating-point addition, so a logic operation never waits for a
// reconfiguration. The design lists AND, OR, XOR "and the usual" logic
// operations; NOR, which also gives NOT, is this implementation's choice.
module ralu_logic_unit
  import ralu_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic_op_e    op,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (op)
      LOG_AND: y = a & b;
      LOG_OR:  y = a | b;
      LOG_XOR: y = a ^ b;
      LOG_NOR: y = ~(a | b);
      default: y = '0;
    endcase
  end
endmodule
