// ralu_reconfig_ctrl: reconfiguration and issue control of the R-ALU.
//
// The R-ALU has two configurations, integer and floating point, held by one
// bit per switch stage: cfg1 for the stage-1 switches (RS1a, RS1b) and cfg2
// for the stage-2 switches (RS2a, RS2b). Reconfiguration is pipelined:
// stage 1 is rewritten in one cycle and stage 2 in a later one, each only in
// a cycle in which that stage's hardware is idle. Which hardware each
// instruction class occupies follows the design:
//   LOG    logic unit only; needs no configuration and may always issue.
//   SHIFT  barrel shifter (stage 1) in its issue cycle; needs cfg1 = INT.
//   ADD    adder (stage 2) in its issue cycle; needs cfg2 = INT.
//   FP-ADD shifter in its issue cycle and adder in the next; needs cfg1 = FP
//          and cfg2 = FP by the next cycle.
// From these rules follow the reconfiguration costs the design tabulates:
// LOG/ADD then FP-ADD costs 0 cycles, SHIFT then FP-ADD 1, FP-ADD then LOG
// not followed by ADD 0, FP-ADD then LOG then ADD 1, FP-ADD then SHIFT 1 and
// FP-ADD then ADD 2.
//
// The controller sees the instruction at the head of the queue (h) and the
// one after it (n). Stage 1 is steered toward the mode of the first of them
// that needs one (an ADD that can issue now does not need stage 1, so the
// look-ahead may reconfigure stage 1 under it; a LOG needs nothing). Stage
// 2 follows stage 1 as soon as the adder is free. The switching policy (on
// demand, one instruction of look-ahead) is this implementation's choice;
// the design leaves the policy open.
//
// Timing: decisions are made in the cycle an instruction is offered; issue
// is combinational and the instruction enters the datapath's stage-1
// registers at the next clock edge. The switch writes (rs*_load, rs*_cfg)
// are registered, so the datapath rewrites a switch stage in the cycle
// after the decision, which is the cycle the instructions issued alongside
// it see as the reconfiguration cycle. Reset puts both stages in integer
// mode (not specified by the design).
module ralu_reconfig_ctrl
  import ralu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  h_valid,
  input  cls_e  h_cls,
  input  logic  n_valid,
  input  cls_e  n_cls,
  output logic  issue,
  output logic  stall,
  // decisions of this cycle (for observation)
  output logic  recfg1,
  output logic  recfg2,
  output mode_e cfg1,
  output mode_e cfg2,
  // switch writes towards the datapath
  output logic  rs1_load,
  output mode_e rs1_cfg,
  output logic  rs2_load,
  output mode_e rs2_cfg
);
  logic  fp_prev;      // an FP-ADD issued last cycle uses the adder now
  logic  add_ready;
  mode_e tgt1;

  function automatic mode_e cls_mode(cls_e c);
    return (c == CLS_FPADD) ? MODE_FP : MODE_INT;
  endfunction

  assign add_ready = (cfg2 == MODE_INT) && !fp_prev;

  always_comb begin
    tgt1 = cfg1;
    if (h_valid && (h_cls == CLS_SHIFT || h_cls == CLS_FPADD))
      tgt1 = cls_mode(h_cls);
    else if (h_valid && h_cls == CLS_ADD && !add_ready)
      tgt1 = MODE_INT;
    else if (n_valid && n_cls != CLS_LOG)
      tgt1 = cls_mode(n_cls);
  end

  always_comb begin
    recfg1 = (tgt1 != cfg1);
    recfg2 = (cfg2 != cfg1) && !fp_prev && !(h_valid && h_cls == CLS_ADD && add_ready);
    unique case (h_cls)
      CLS_LOG:   issue = h_valid;
      CLS_SHIFT: issue = h_valid && cfg1 == MODE_INT;
      CLS_ADD:   issue = h_valid && add_ready;
      default:   issue = h_valid && cfg1 == MODE_FP && (cfg2 == MODE_FP || recfg2);
    endcase
    stall = h_valid && !issue;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg1     <= MODE_INT;
      cfg2     <= MODE_INT;
      fp_prev  <= 1'b0;
      rs1_load <= 1'b0;
      rs2_load <= 1'b0;
      rs1_cfg  <= MODE_INT;
      rs2_cfg  <= MODE_INT;
    end else begin
      if (recfg1) cfg1 <= tgt1;
      if (recfg2) cfg2 <= cfg1;
      fp_prev  <= issue && h_cls == CLS_FPADD;
      rs1_load <= recfg1;
      rs1_cfg  <= tgt1;
      rs2_load <= recfg2;
      rs2_cfg  <= cfg1;
    end
  end

  // A shift never issues with stage 1 being rewritten, nor an ADD with the
  // adder busy.
  a_no_shift_during_recfg: assert property (@(posedge clk) disable iff (!rst_n)
    (issue && h_cls == CLS_SHIFT) |-> !recfg1);
  a_no_add_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (issue && h_cls == CLS_ADD) |-> !fp_prev && !recfg2);
endmodule
