// ralu_datapath: the reconfigurable integer / floating-point ALU (R-ALU).
//
// The datapath is a three-stage IEEE 754 binary64 adder whose adder is
// widened to 64 bits and whose alignment shifter is a 64-bit barrel shifter,
// so that the same hardware also executes 64-bit integer ADD, SUB, SLL and
// SRL. A separate logic unit does AND/OR/XOR/NOR. Four programmable
// switches select between the two uses:
//   RS1a  swap control: exponent comparison (FP) or constant 0 (integer)
//   RS1b  barrel shifter control: alignment distance, right (FP) or the
//         instruction's shift amount and direction (integer)
//   RS2a  adder input a: A2 register (FP) or A1 register (integer)
//   RS2b  adder input b: B2 register (FP) or B1 register (integer)
// RS1a/RS1b form the stage-1 configuration and RS2a/RS2b the stage-2
// configuration; each pair is rewritten by one load pulse (rs1_load,
// rs2_load) that the reconfiguration controller raises in the cycle it
// devotes to that stage. The mode bit of RS1a also tells the unpacking
// logic in front of the shifter whether to insert the hidden bit; that use
// is this implementation's.
//
// Timing. An instruction accepted with in_valid is held in the stage-1
// registers A1/B1 in the next cycle. Integer results are formed from A1/B1
// in that cycle and appear on int_result with int_valid (latency one
// cycle); with RS2a/RS2b in integer mode the adder reads A1/B1 directly.
// FP-ADD swaps and aligns in stage 1, adds (sum and sum+1) and predicts the
// leading one beside the adder in stage 2, and selects, normalises and rounds in stage 3,
// where fp_result appears with fp_valid (latency three cycles). The two
// output ports stand for the integer and floating-point result buses; the
// design drives them with three-state drivers, here they are multiplexers.
// The pipeline never stalls: the controller issues only instructions whose
// stage resources are free and configured, which the assertions check.
module ralu_datapath
  import ralu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // instruction entering stage 1
  input  logic            in_valid,
  input  instr_t          in_instr,
  // switch configuration writes
  input  logic            rs1_load,
  input  mode_e           rs1_cfg,
  input  logic            rs2_load,
  input  mode_e           rs2_cfg,
  // result ports
  output logic            int_valid,
  output logic [XLEN-1:0] int_result,
  output logic            fp_valid,
  output logic [XLEN-1:0] fp_result,
  // current switch configuration
  output mode_e           rs1_mode,
  output mode_e           rs2_mode
);
  // ---------------- stage 1 ----------------
  logic            v1;
  op_e             op1;
  logic [SHW-1:0]  shamt1;
  logic [XLEN-1:0] a1, b1;
  ctrl_t           ctrl1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_valid) begin
      op1    <= in_instr.op;
      shamt1 <= in_instr.shamt;
      a1     <= in_instr.a;
      b1     <= in_instr.b;
    end
  end

  ralu_decoder u_dec (.op(op1), .ctrl(ctrl1));

  logic fp1;
  assign fp1 = v1 && ctrl1.cls == CLS_FPADD;

  // exponent compare and swap, with RS1a on the swap control
  logic             a_lt_b, swap_ctl, m1a, m1b;
  logic [SHW-1:0]   align_amt;
  logic [EXP_W-1:0] exp_big1;
  logic [XLEN-1:0]  greater1, lesser1;

  ralu_switch #(.W(1)) u_rs1a (
    .clk, .rst_n, .load(rs1_load), .cfg(rs1_cfg),
    .i1(a_lt_b), .i2(1'b0), .y(swap_ctl), .m(m1a)
  );

  ralu_swap u_swap (
    .a(a1), .b(b1), .do_swap(swap_ctl), .a_lt_b, .shamt(align_amt),
    .exp_big(exp_big1), .greater(greater1), .lesser(lesser1)
  );

  // RS1b: shifter direction and distance
  logic           sh_left;
  logic [SHW-1:0] sh_amt;
  ralu_switch #(.W(SHW+1)) u_rs1b (
    .clk, .rst_n, .load(rs1_load), .cfg(rs1_cfg),
    .i1({1'b0, align_amt}), .i2({ctrl1.shift_left, shamt1}),
    .y({sh_left, sh_amt}), .m(m1b)
  );

  function automatic logic [XLEN-1:0] unpack_sig(logic [XLEN-1:0] w);
    return {1'b0, (w[62:52] != '0), w[51:0], {(GUARD_W+1){1'b0}}};
  endfunction

  logic [XLEN-1:0] sh_in, sh_out, b2_in;
  logic            sh_sticky;
  assign sh_in = m1a ? unpack_sig(lesser1) : lesser1;

  ralu_barrel_shifter #(.W(XLEN)) u_barrel (
    .d(sh_in), .amt(sh_amt), .left(sh_left), .y(sh_out), .sticky(sh_sticky)
  );
  // Bits shifted out are folded into bit 0 (below the guard bits).
  assign b2_in = {sh_out[XLEN-1:1], sh_out[0] | sh_sticky};

  // special operands
  logic a_max, b_max, a_nan, b_nan, a_inf, b_inf, nan1, inf1, infs1;
  assign a_max = a1[62:52] == 11'h7FF;
  assign b_max = b1[62:52] == 11'h7FF;
  assign a_nan = a_max && a1[51:0] != '0;
  assign b_nan = b_max && b1[51:0] != '0;
  assign a_inf = a_max && a1[51:0] == '0;
  assign b_inf = b_max && b1[51:0] == '0;
  assign nan1  = a_nan || b_nan || (a_inf && b_inf && a1[63] != b1[63]);
  assign inf1  = a_inf || b_inf;
  assign infs1 = a_inf ? a1[63] : b1[63];

  // logic unit
  logic [XLEN-1:0] log_out;
  ralu_logic_unit u_logic (.a(a1), .b(b1), .op(ctrl1.log_op), .y(log_out));

  // ---------------- stage 2 ----------------
  logic             v2, sa2, sb2, swp2, nan2, inf2, infs2;
  logic [XLEN-1:0]  a2, b2;
  logic [EXP_W-1:0] exp2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= fp1;
  end
  always_ff @(posedge clk) begin
    if (fp1) begin
      a2    <= unpack_sig(greater1);
      b2    <= b2_in;
      exp2  <= exp_big1;
      sa2   <= a1[63];
      sb2   <= b1[63];
      swp2  <= a_lt_b;
      nan2  <= nan1;
      inf2  <= inf1;
      infs2 <= infs1;
    end
  end

  logic            eff_sub2, m2a, m2b, inv_b, cy0, cy1;
  logic [XLEN-1:0] add_a, add_b, sum, sum1;
  logic [SHW:0]    lz2;
  logic            zero2;
  assign eff_sub2 = sa2 ^ sb2;

  ralu_switch #(.W(XLEN)) u_rs2a (
    .clk, .rst_n, .load(rs2_load), .cfg(rs2_cfg), .i1(a2), .i2(a1), .y(add_a), .m(m2a)
  );
  ralu_switch #(.W(XLEN)) u_rs2b (
    .clk, .rst_n, .load(rs2_load), .cfg(rs2_cfg), .i1(b2), .i2(b1), .y(add_b), .m(m2b)
  );

  assign inv_b = m2a ? eff_sub2 : ctrl1.sub;

  ralu_adder #(.W(XLEN)) u_adder (
    .a(add_a), .b(add_b), .inv_b, .sum, .sum1, .cy0, .cy1
  );

  // The LOP sees the adder's operands, b inverted as the adder inverts it.
  ralu_lop #(.W(XLEN)) u_lop (
    .a(add_a), .b(m2a ? (eff_sub2 ? ~add_b : add_b) : add_b), .sub(eff_sub2), .lz(lz2), .zero(zero2)
  );

  // ---------------- stage 3 ----------------
  logic             v3, sa3, sb3, swp3, cy3, eff3, nan3, inf3, infs3;
  logic [XLEN-1:0]  sum3, sum13;
  logic [SHW:0]     lz3;
  logic [EXP_W-1:0] exp3;
  logic             zero3, sign3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end
  always_ff @(posedge clk) begin
    if (v2) begin
      sum3  <= sum;
      sum13 <= sum1;
      cy3   <= cy1;
      lz3   <= lz2;
      zero3 <= zero2;
      exp3  <= exp2;
      sa3   <= sa2;
      sb3   <= sb2;
      swp3  <= swp2;
      eff3  <= eff_sub2;
      nan3  <= nan2;
      inf3  <= inf2;
      infs3 <= infs2;
    end
  end

  ralu_sign u_sign (
    .sign_a(sa3), .sign_b(sb3), .swapped(swp3), .cy(cy3), .mag_zero(zero3), .sign(sign3)
  );

  ralu_normalize u_norm (
    .sum(sum3), .sum1(sum13), .cy(cy3), .eff_sub(eff3), .lz(lz3), .exp_big(exp3),
    .sign(sign3), .is_nan(nan3), .is_inf(inf3), .inf_sign(infs3), .result(fp_result)
  );
  assign fp_valid = v3;

  // ---------------- integer output port ----------------
  assign int_valid = v1 && ctrl1.cls != CLS_FPADD;
  always_comb begin
    unique case (ctrl1.int_sel)
      ISEL_ADDER:   int_result = ctrl1.sub ? sum1 : sum;
      ISEL_SHIFTER: int_result = sh_out;
      default:      int_result = log_out;
    endcase
  end

  assign rs1_mode = mode_e'(m1a);
  assign rs2_mode = mode_e'(m2a);

  // ---------------- configuration rules ----------------
  a_int_add_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    (v1 && ctrl1.cls == CLS_ADD) |-> (m2a == MODE_INT && !v2));
  a_shift_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    (v1 && ctrl1.cls == CLS_SHIFT) |-> m1a == MODE_INT);
  a_fp1_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    fp1 |-> m1a == MODE_FP);
  a_fp2_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    v2 |-> m2a == MODE_FP);
  a_rs1_idle: assert property (@(posedge clk) disable iff (!rst_n)
    rs1_load |-> !(v1 && ctrl1.cls inside {CLS_SHIFT, CLS_FPADD}));
  a_rs2_idle: assert property (@(posedge clk) disable iff (!rst_n)
    rs2_load |-> !(v2 || (v1 && ctrl1.cls == CLS_ADD)));
  a_switch_pairs: assert property (@(posedge clk) disable iff (!rst_n)
    (m1a == m1b) && (m2a == m2b));
endmodule
