// tb_ralu_top: end-to-end test of the R-ALU with its reconfiguration
// control, at the default (and only) configuration.
//
// Phase 1 replays every case of the switching-cost table (integer to FP and
// FP to integer) with real operands and measures the cost from the cycles
// at which results appear: integer results one cycle and FP-ADD results
// three cycles after issue. Phase 2 alternates blocks of integer ADDs and
// FP-ADDs, the situation for which the design estimates one cycle of
// reconfiguration per switch on average, and checks that average. Phase 3
// runs a long random instruction stream with gaps in the input. Every
// result is compared with a reference, and the test counts how often each
// mechanism occurred (stalls, stage-1 and stage-2 rewrites in both
// directions, logic results overtaking pending FP-ADDs, input back-pressure,
// subnormal, infinite and NaN sums, negative integer differences); one that
// never occurred counts as a failure.
module tb_ralu_top;
  import ralu_pkg::*;
  import ralu_tb_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, int_valid, fp_valid, stall, recfg1, recfg2;
  instr_t      in_instr;
  logic [63:0] int_result, fp_result;
  mode_e       rs1_mode, rs2_mode;
  int checks = 0, failures = 0, cycle = 0;

  ralu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program and scoreboard ----------------
  instr_t      prog [$];
  logic        gap  [$];     // leave the input idle for one cycle before this one
  int          pidx;
  int          issue_cyc [$];
  logic [63:0] expv [$];
  int          iq [$], fq [$]; // program indices awaiting a result, per port
  int          n_issued;

  // mechanism counters
  int c_stall, c_rs1_to_fp, c_rs1_to_int, c_rs2_to_fp, c_rs2_to_int;
  int c_overtake, c_backpressure, c_subnormal, c_inf, c_nan, c_negdiff, c_gap;

  function automatic instr_t mk(op_e op, logic [63:0] a, logic [63:0] b, logic [5:0] sh);
    return '{op: op, shamt: sh, a: a, b: b};
  endfunction

  task automatic add_instr(instr_t ins, logic g = 1'b0);
    prog.push_back(ins);
    gap.push_back(g);
    issue_cyc.push_back(-1);
    if (ins.op == OP_FPADD) expv.push_back(fp_ref(ins.a, ins.b));
    else expv.push_back(int_ref(ins.op, ins.a, ins.b, ins.shamt));
  endtask

  function automatic instr_t rand_of(cls_e c);
    logic [63:0] x;
    case (c)
      CLS_ADD:   return mk(($urandom % 2) != 0 ? OP_SUB : OP_ADD, {$urandom, $urandom}, {$urandom, $urandom}, 0);
      CLS_SHIFT: return mk(($urandom % 2) != 0 ? OP_SLL : OP_SRL, {$urandom, $urandom}, {$urandom, $urandom}, 6'($urandom));
      CLS_LOG:   return mk(op_e'(4 + $urandom % 4), {$urandom, $urandom}, {$urandom, $urandom}, 0);
      default: begin
        x = rand_fp(64'h3FF8_0000_0000_0000);
        return mk(OP_FPADD, x, rand_fp(x), 0);
      end
    endcase
  endfunction

  // input driver: offer prog[pidx], honouring gaps
  logic gap_now;
  always @(negedge clk) begin
    gap_now = 1'b0;
    if (pidx < prog.size() && gap[pidx]) begin
      gap_now = 1'b1;
      gap[pidx] = 1'b0;
      c_gap++;
    end
    in_valid = rst_n && pidx < prog.size() && !gap_now;
    in_instr = (pidx < prog.size()) ? prog[pidx] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (prog[pidx].op == OP_FPADD) fq.push_back(pidx); else iq.push_back(pidx);
      pidx <= pidx + 1;
    end
    if (in_valid && !in_ready) c_backpressure++;
  end

  // result checking
  int k;
  always @(posedge clk) if (rst_n) begin
    if (int_valid) begin
      checks++;
      if (iq.size() == 0) begin failures++; $display("FAIL unexpected int result"); end
      else begin
        k = iq.pop_front();
        issue_cyc[k] = cycle - 1;
        n_issued++;
        if (fq.size() != 0 && fq[0] < k) c_overtake++;
        if (prog[k].op == OP_SUB && expv[k][63]) c_negdiff++;
        if (int_result !== expv[k]) begin
          failures++;
          $display("FAIL #%0d op=%s got %h exp %h", k, prog[k].op.name(), int_result, expv[k]);
        end
      end
    end
    if (fp_valid) begin
      checks++;
      if (fq.size() == 0) begin failures++; $display("FAIL unexpected fp result"); end
      else begin
        k = fq.pop_front();
        issue_cyc[k] = cycle - 3;
        n_issued++;
        if (expv[k][62:52] == 0 && expv[k][51:0] != 0) c_subnormal++;
        if (expv[k] == FP_QNAN) c_nan++;
        if (expv[k][62:0] == {11'h7FF, 52'd0}) c_inf++;
        if (fp_result !== expv[k]) begin
          failures++;
          $display("FAIL #%0d fpadd %h + %h got %h exp %h", k, prog[k].a, prog[k].b, fp_result, expv[k]);
        end
      end
    end
    if (stall) c_stall++;
    if (recfg1 && rs1_mode == MODE_INT) c_rs1_to_fp++;
    if (recfg1 && rs1_mode == MODE_FP)  c_rs1_to_int++;
    if (recfg2 && rs2_mode == MODE_INT) c_rs2_to_fp++;
    if (recfg2 && rs2_mode == MODE_FP)  c_rs2_to_int++;
  end

  task automatic drain();
    wait (pidx == prog.size());
    repeat (6) @(posedge clk);
    @(negedge clk);
  endtask

  // ---------------- phase 1: switching table ----------------
  task automatic table_case(string name, cls_e warm, cls_e i0, cls_e i1, cls_e i2, int exp_cost);
    int base, cost;
    for (int j = 0; j < 4; j++) add_instr(rand_of(warm));
    base = prog.size();
    add_instr(rand_of(i0)); add_instr(rand_of(i1)); add_instr(rand_of(i2));
    for (int j = 0; j < 4; j++) add_instr(rand_of(CLS_LOG));
    drain();
    cost = issue_cyc[base+2] - issue_cyc[base] - 2;
    checks++;
    if (cost != exp_cost) begin
      failures++;
      $display("FAIL %s: cost %0d cycles, expected %0d", name, cost, exp_cost);
    end else
      $display("switch %-18s cost %0d cycle(s)", name, cost);
  endtask

  initial begin
    int t0, switches, start_block, pen;
    real avg;
    pidx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    table_case("LOG   FPADD FPADD", CLS_ADD,   CLS_LOG,   CLS_FPADD, CLS_FPADD, 0);
    table_case("ADD   FPADD FPADD", CLS_ADD,   CLS_ADD,   CLS_FPADD, CLS_FPADD, 0);
    table_case("SHIFT FPADD FPADD", CLS_ADD,   CLS_SHIFT, CLS_FPADD, CLS_FPADD, 1);
    table_case("FPADD LOG   LOG",   CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_LOG,   0);
    table_case("FPADD LOG   SHIFT", CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_SHIFT, 0);
    table_case("FPADD LOG   ADD",   CLS_FPADD, CLS_FPADD, CLS_LOG,   CLS_ADD,   1);
    table_case("FPADD SHIFT ADD",   CLS_FPADD, CLS_FPADD, CLS_SHIFT, CLS_ADD,   1);
    table_case("FPADD SHIFT LOG",   CLS_FPADD, CLS_FPADD, CLS_SHIFT, CLS_LOG,   1);
    table_case("FPADD ADD   ADD",   CLS_FPADD, CLS_FPADD, CLS_ADD,   CLS_ADD,   2);

    // ---------------- phase 2: ADD / FP-ADD blocks ----------------
    start_block = prog.size();
    switches = 0;
    for (int blk = 0; blk < 41; blk++) begin
      for (int j = 0; j < 6; j++) add_instr(rand_of((blk % 2) != 0 ? CLS_FPADD : CLS_ADD));
      switches++;
    end
    drain();
    pen = (issue_cyc[prog.size()-1] - issue_cyc[start_block]) - (prog.size() - 1 - start_block);
    // the first block needs no switch (already in integer mode after phase 1)
    avg = real'(pen) / real'(switches - 1);
    checks++;
    if (avg != 1.0) begin
      failures++;
      $display("FAIL ADD/FP-ADD blocks: %0d cycles over %0d switches", pen, switches - 1);
    end else
      $display("ADD/FP-ADD blocks: %0d reconfiguration cycles over %0d switches, average %0.2f",
               pen, switches - 1, avg);

    // ---------------- phase 3: random stream ----------------
    t0 = prog.size();
    begin
      cls_e cur;
      cur = CLS_ADD;
      for (int j = 0; j < 6000; j++) begin
        int r;
        r = $urandom % 100;
        // clustered stream: mostly stay in the current kind of work
        if (r < 8) cur = cls_e'($urandom % 4);
        r = $urandom % 100;
        add_instr(r < 70 ? rand_of(cur) : rand_of(cls_e'($urandom % 4)), ($urandom % 20) == 0);
      end
    end
    drain();

    checks++;
    if (iq.size() != 0 || fq.size() != 0 || n_issued != prog.size()) begin
      failures++;
      $display("FAIL %0d of %0d instructions completed", n_issued, prog.size());
    end

    $display("instructions %0d, cycles %0d", prog.size(), cycle);
    $display("stall cycles %0d", c_stall);
    $display("stage-1 rewrites to FP %0d, to INT %0d", c_rs1_to_fp, c_rs1_to_int);
    $display("stage-2 rewrites to FP %0d, to INT %0d", c_rs2_to_fp, c_rs2_to_int);
    $display("logic results overtaking FP-ADD %0d", c_overtake);
    $display("input back-pressure cycles %0d, input gaps %0d", c_backpressure, c_gap);
    $display("subnormal sums %0d, infinite sums %0d, NaN sums %0d, negative differences %0d",
             c_subnormal, c_inf, c_nan, c_negdiff);
    if (c_stall == 0)        begin failures++; $display("FAIL no stall"); end
    if (c_rs1_to_fp == 0)    begin failures++; $display("FAIL no stage-1 switch to FP"); end
    if (c_rs1_to_int == 0)   begin failures++; $display("FAIL no stage-1 switch to INT"); end
    if (c_rs2_to_fp == 0)    begin failures++; $display("FAIL no stage-2 switch to FP"); end
    if (c_rs2_to_int == 0)   begin failures++; $display("FAIL no stage-2 switch to INT"); end
    if (c_overtake == 0)     begin failures++; $display("FAIL no overtaking logic result"); end
    if (c_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (c_gap == 0)          begin failures++; $display("FAIL no input gap"); end
    if (c_subnormal == 0)    begin failures++; $display("FAIL no subnormal sum"); end
    if (c_inf == 0)          begin failures++; $display("FAIL no infinite sum"); end
    if (c_nan == 0)          begin failures++; $display("FAIL no NaN sum"); end
    if (c_negdiff == 0)      begin failures++; $display("FAIL no negative difference"); end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
