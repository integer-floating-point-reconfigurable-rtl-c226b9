// ralu_tb_pkg: reference results for the R-ALU testbenches. Integer results
// use SystemVerilog's own operators; FP-ADD results use the simulator's
// double-precision addition (IEEE 754, round to nearest even), with any NaN
// mapped to the R-ALU's quiet NaN 0x7FF8000000000000.
package ralu_tb_pkg;
  import ralu_pkg::*;

  function automatic logic [63:0] int_ref(op_e op, logic [63:0] a, logic [63:0] b, logic [5:0] sh);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_SLL:  return b << sh;
      OP_SRL:  return b >> sh;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~(a | b);
      default: return '0;
    endcase
  endfunction

  function automatic logic is_nan64(logic [63:0] w);
    return w[62:52] == 11'h7FF && w[51:0] != 0;
  endfunction

  function automatic logic [63:0] fp_ref(logic [63:0] a, logic [63:0] b);
    logic [63:0] r;
    r = $realtobits($bitstoreal(a) + $bitstoreal(b));
    return is_nan64(r) ? FP_QNAN : r;
  endfunction

  // Random binary64 operand with a mix of magnitudes, subnormals and
  // special values.
  function automatic logic [63:0] rand_fp(logic [63:0] other);
    logic [63:0] w;
    int k;
    w = {$urandom, $urandom};
    k = $urandom % 16;
    case (k)
      0:       w[62:52] = 11'($urandom % 3);
      1:       w[62:52] = 11'h7FE;
      2:       w = {$urandom % 2 == 0, 11'h7FF, 52'd0};
      3:       w = {~other[63], other[62:0]};
      4:       begin w = other; w[63] = ~other[63]; w[5:0] = 6'($urandom); end
      5, 6, 7: w[62:52] = other[62:52] + 11'($urandom % 8) - 11'd4;
      8:       w[62:52] = other[62:52] - 11'd54;
      default: w[62:52] = 11'(1023 + $urandom % 64 - 32);
    endcase
    if (k != 2 && w[62:52] == 11'h7FF && $urandom % 8 != 0) w[62:52] = 11'h7FE;
    return w;
  endfunction
endpackage
