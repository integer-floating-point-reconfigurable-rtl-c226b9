// tb_ralu_reconfig_ctrl: checks the reconfiguration costs of every case the
// R-ALU switching table lists, using a small instruction queue model. Each
// case starts from a settled mode (four instructions of the old mode), then
// the three instructions i, i+1, i+2 of the table row, then LOG fillers.
// The cost is issue(i+2) - issue(i) - 2 cycles. It also checks the
// per-cycle rules: a SHIFT issues only with stage 1 in integer mode, an ADD
// only with stage 2 in integer mode and no FP-ADD in the adder, an FP-ADD
// only with stage 1 in FP mode and stage 2 in FP mode by the next cycle,
// that a stage is rewritten only while idle, and that the switch writes follow the decisions by one cycle.
module tb_ralu_reconfig_ctrl;
  import ralu_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  h_valid, n_valid, issue, stall, recfg1, recfg2, rs1_load, rs2_load;
  cls_e  h_cls, n_cls;
  mode_e cfg1, cfg2, rs1_cfg, rs2_cfg;
  int checks = 0, failures = 0;
  int cycle = 0;

  ralu_reconfig_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cls_e prog [$];
  int   issued_at [$];
  int   idx;
  logic fp_prev_m, recfg1_d, recfg2_d;
  mode_e tgt1_d, cfg1_d;

  assign h_valid = idx < prog.size();
  assign h_cls   = h_valid ? prog[idx] : CLS_LOG;
  assign n_valid = idx + 1 < prog.size();
  assign n_cls   = n_valid ? prog[idx+1] : CLS_LOG;

  // per-cycle rule checks
  always @(posedge clk) if (rst_n) begin
    if (issue) begin
      issued_at.push_back(cycle);
      checks++;
      case (h_cls)
        CLS_SHIFT: if (cfg1 != MODE_INT) begin failures++; $display("FAIL shift cfg"); end
        CLS_ADD:   if (cfg2 != MODE_INT || fp_prev_m) begin failures++; $display("FAIL add cfg"); end
        CLS_FPADD: if (cfg1 != MODE_FP || !(cfg2 == MODE_FP || recfg2)) begin failures++; $display("FAIL fp cfg"); end
        default: ;
      endcase
    end
    // a stage is rewritten only while its hardware is idle
    checks++;
    if ((recfg1 && issue && h_cls inside {CLS_SHIFT, CLS_FPADD}) ||
        (recfg2 && (fp_prev_m || (issue && h_cls == CLS_ADD)))) begin
      failures++;
      $display("FAIL stage rewritten while in use at %0d", cycle);
    end
    // switch writes are the decisions delayed by one cycle
    checks++;
    if (rs1_load !== recfg1_d || rs2_load !== recfg2_d ||
        (recfg1_d && rs1_cfg !== tgt1_d) || (recfg2_d && rs2_cfg !== cfg1_d)) begin
      failures++;
      $display("FAIL switch write timing at %0d", cycle);
    end
  end

  always @(posedge clk) begin
    fp_prev_m <= rst_n && issue && h_cls == CLS_FPADD;
    recfg1_d  <= rst_n && recfg1;
    recfg2_d  <= rst_n && recfg2;
    tgt1_d    <= (cfg1 == MODE_INT) ? MODE_FP : MODE_INT;
    cfg1_d    <= cfg1;
  end

  always @(posedge clk) if (rst_n && issue) idx <= idx + 1;

  task automatic run_case(string name, cls_e warm, cls_e i0, cls_e i1, cls_e i2, int exp_cost);
    int base, cost;
    @(negedge clk);
    prog.delete();
    issued_at.delete();
    for (int k = 0; k < 4; k++) prog.push_back(warm);
    prog.push_back(i0); prog.push_back(i1); prog.push_back(i2);
    for (int k = 0; k < 4; k++) prog.push_back(CLS_LOG);
    idx = 0;
    wait (idx == prog.size());
    @(negedge clk);
    base = 4;
    cost = issued_at[base+2] - issued_at[base] - 2;
    checks++;
    if (cost != exp_cost) begin
      failures++;
      $display("FAIL %s: cost %0d, expected %0d", name, cost, exp_cost);
    end else
      $display("case %-22s cost %0d", name, cost);
  endtask

  initial begin
    idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // integer to floating point
    run_case("LOG FPADD FPADD",     CLS_ADD,   CLS_LOG,   CLS_FPADD, CLS_FPADD, 0);
    run_case("ADD FPADD FPADD",     CLS_ADD,   CLS_ADD,   CLS_FPADD, CLS_FPADD, 0);
    run_case("SHIFT FPADD FPADD",   CLS_ADD,   CLS_SHIFT, CLS_FPADD, CLS_FPADD, 1);
    // floating point to integer
    run_case("FPADD LOG LOG",       CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_LOG,   0);
    run_case("FPADD LOG SHIFT",     CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_SHIFT, 0);
    run_case("FPADD LOG ADD",       CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_ADD,   1);
    run_case("FPADD SHIFT ADD",     CLS_FPADD, CLS_FPADD, CLS_SHIFT, CLS_ADD,   1);
    run_case("FPADD SHIFT LOG",     CLS_FPADD, CLS_FPADD, CLS_SHIFT, CLS_LOG,   1);
    run_case("FPADD ADD ADD",       CLS_FPADD, CLS_FPADD, CLS_ADD,   CLS_ADD,   2);
    run_case("FPADD ADD SHIFT",     CLS_FPADD, CLS_FPADD, CLS_ADD,   CLS_SHIFT, 2);
    // no switch at all
    run_case("FPADD FPADD FPADD",   CLS_FPADD, CLS_FPADD, CLS_FPADD, CLS_FPADD, 0);
    run_case("ADD SHIFT ADD",       CLS_ADD,   CLS_ADD,   CLS_SHIFT, CLS_ADD,   0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
