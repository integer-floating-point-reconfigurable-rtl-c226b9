// ralu_pkg: types and constants shared by the reconfigurable integer /
// floating-point ALU (R-ALU).
//
// The R-ALU executes 64-bit integer ADD, SUB, SLL, SRL and bitwise logic
// operations, and IEEE 754 double-precision addition (FP-ADD). The operation
// set follows the design; the binary encoding of the operations, the extra
// NOR logic operation and the instruction classes used by the
// reconfiguration controller are this implementation's choices.
package ralu_pkg;

  localparam int unsigned XLEN    = 64;  // integer word and adder width
  localparam int unsigned SHW     = 6;   // shift amount width (log2 XLEN)
  localparam int unsigned EXP_W   = 11;  // binary64 exponent field
  localparam int unsigned FRAC_W  = 52;  // binary64 fraction field
  localparam int unsigned GUARD_W = 9;   // extra alignment bits below the significand

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_SLL   = 4'd2,
    OP_SRL   = 4'd3,
    OP_AND   = 4'd4,
    OP_OR    = 4'd5,
    OP_XOR   = 4'd6,
    OP_NOR   = 4'd7,
    OP_FPADD = 4'd8
  } op_e;

  // Instruction classes as the reconfiguration rules see them.
  typedef enum logic [1:0] {
    CLS_LOG   = 2'd0,  // logic unit only: needs no configuration
    CLS_ADD   = 2'd1,  // integer add/sub: needs the adder (stage 2) in integer mode
    CLS_SHIFT = 2'd2,  // shift: needs the barrel shifter (stage 1) in integer mode
    CLS_FPADD = 2'd3   // FP add: stage 1 then stage 2 in floating-point mode
  } cls_e;

  typedef enum logic [1:0] {
    LOG_AND = 2'd0,
    LOG_OR  = 2'd1,
    LOG_XOR = 2'd2,
    LOG_NOR = 2'd3
  } logic_op_e;

  // Integer output port drivers (three-state drivers onto the integer bus).
  typedef enum logic [1:0] {
    ISEL_ADDER   = 2'd0,
    ISEL_SHIFTER = 2'd1,
    ISEL_LOGIC   = 2'd2
  } int_sel_e;

  // Switch configuration: the one-bit memory of every programmable switch.
  typedef enum logic {
    MODE_INT = 1'b0,
    MODE_FP  = 1'b1
  } mode_e;

  // One instruction as presented to the R-ALU.
  typedef struct packed {
    op_e             op;
    logic [SHW-1:0]  shamt;  // shift amount from the instruction (SLL/SRL)
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
  } instr_t;

  // Decoded controls.
  typedef struct packed {
    cls_e      cls;
    int_sel_e  int_sel;
    logic_op_e log_op;
    logic      sub;        // adder computes a - b
    logic      shift_left; // barrel shifter direction for SLL
  } ctrl_t;

  function automatic cls_e op_class(op_e op);
    case (op)
      OP_ADD, OP_SUB: return CLS_ADD;
      OP_SLL, OP_SRL: return CLS_SHIFT;
      OP_FPADD:       return CLS_FPADD;
      default:        return CLS_LOG;
    endcase
  endfunction

  localparam logic [XLEN-1:0] FP_QNAN = 64'h7FF8_0000_0000_0000;

endpackage
