// ralu_top: reconfigurable integer / floating-point ALU with its
// reconfiguration control.
//
// Instructions arrive on a valid/ready handshake (in_valid, in_ready,
// in_instr) and wait in a two-entry queue. Every cycle the reconfiguration
// controller inspects the head and the instruction behind it (the second
// entry, or the one on the input when the queue holds only the head).
// The controller issues the head into the R-ALU datapath when the hardware
// it needs is configured and free, rewrites the programmable switches in
// the cycles the design allows, and otherwise inserts a bubble (stall).
// Integer results leave on the integer port one cycle after issue, FP-ADD
// results on the floating-point port three cycles after issue; each port
// delivers its results in issue order. The operation set, the latencies and
// the switching rules follow the design; the queue, its valid/ready
// handshake and the look-ahead source are this implementation's stand-in
// for the issue logic of the processor around the R-ALU.
//
// Status outputs: stall is high in a cycle where the head instruction waits
// for a reconfiguration; recfg1/recfg2 mark the cycle in which the stage-1
// (RS1a/RS1b) and stage-2 (RS2a/RS2b) switches are being rewritten;
// rs1_mode/rs2_mode give the switch settings in force.
module ralu_top
  import ralu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  instr_t          in_instr,
  output logic            int_valid,
  output logic [XLEN-1:0] int_result,
  output logic            fp_valid,
  output logic [XLEN-1:0] fp_result,
  output logic            stall,
  output logic            recfg1,
  output logic            recfg2,
  output mode_e           rs1_mode,
  output mode_e           rs2_mode
);
  // two-entry instruction queue: q[0] is the head
  instr_t q [2];
  logic   qv [2];
  logic   issue, push;

  assign in_ready = !qv[1] || issue;
  assign push     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qv[0] <= 1'b0;
      qv[1] <= 1'b0;
    end else begin
      unique case ({issue, push})
        2'b10: begin qv[0] <= qv[1]; qv[1] <= 1'b0; end
        2'b01: if (!qv[0]) qv[0] <= 1'b1; else qv[1] <= 1'b1;
        2'b11: begin qv[0] <= 1'b1; qv[1] <= qv[1]; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case ({issue, push})
      2'b10: q[0] <= q[1];
      2'b01: if (!qv[0]) q[0] <= in_instr; else q[1] <= in_instr;
      2'b11: if (qv[1]) begin q[0] <= q[1]; q[1] <= in_instr; end
             else q[0] <= in_instr;
      default: ;
    endcase
  end

  logic  rs1_load, rs2_load;
  mode_e rs1_cfg, rs2_cfg, cfg1, cfg2;
  logic  dec_recfg1, dec_recfg2;

  // Look-ahead: the second queue entry, or the instruction on the input
  // when the queue holds only the head (as it does whenever instructions
  // arrive at the issue rate).
  logic  n_valid;
  cls_e  n_cls;
  assign n_valid = qv[1] || (qv[0] && in_valid);
  assign n_cls   = qv[1] ? op_class(q[1].op) : op_class(in_instr.op);

  ralu_reconfig_ctrl u_ctrl (
    .clk, .rst_n,
    .h_valid(qv[0]), .h_cls(op_class(q[0].op)),
    .n_valid(n_valid), .n_cls(n_cls),
    .issue, .stall, .recfg1(dec_recfg1), .recfg2(dec_recfg2), .cfg1, .cfg2,
    .rs1_load, .rs1_cfg, .rs2_load, .rs2_cfg
  );

  ralu_datapath u_ralu (
    .clk, .rst_n,
    .in_valid(issue), .in_instr(q[0]),
    .rs1_load, .rs1_cfg, .rs2_load, .rs2_cfg,
    .int_valid, .int_result, .fp_valid, .fp_result,
    .rs1_mode, .rs2_mode
  );

  // The switch writes reach the datapath one cycle after the decision.
  assign recfg1 = rs1_load;
  assign recfg2 = rs2_load;
endmodule
