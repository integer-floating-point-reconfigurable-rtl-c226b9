// tb_ralu_datapath: drives the R-ALU datapath directly, with its own
// configuration sequence, and checks
//  - integer ADD/SUB/SLL/SRL/logic results one cycle after issue,
//  - back-to-back FP-ADD results three cycles after issue (one per cycle),
//  - logic operations issued while the unit is in FP mode, whose results
//    overtake a pending FP-ADD on the integer port,
//  - rounding cases decided only by the alignment sticky bit,
//  - the pipelined switch rewrite (stage 1 one cycle, stage 2 the next)
//    both ways,
// against reference results.
module tb_ralu_datapath;
  import ralu_pkg::*;
  import ralu_tb_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            in_valid = 0, rs1_load = 0, rs2_load = 0;
  instr_t          in_instr;
  mode_e           rs1_cfg = MODE_INT, rs2_cfg = MODE_INT, rs1_mode, rs2_mode;
  logic            int_valid, fp_valid;
  logic [63:0]     int_result, fp_result;
  int checks = 0, failures = 0, cycle = 0;
  int n_int = 0, n_fp = 0, n_log_in_fp = 0, n_tie = 0;

  ralu_datapath dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] v; int due; } exp_t;
  exp_t iq [$], fq [$];

  // result checking: value and cycle of arrival
  exp_t e;
  always @(posedge clk) if (rst_n) begin
    if (int_valid) begin
      checks++;
      if (iq.size() == 0) begin failures++; $display("FAIL unexpected int result"); end
      else begin
        e = iq.pop_front();
        if (int_result !== e.v || cycle != e.due) begin
          failures++;
          $display("FAIL int got %h exp %h at %0d due %0d", int_result, e.v, cycle, e.due);
        end
      end
    end
    if (fp_valid) begin
      checks++;
      if (fq.size() == 0) begin failures++; $display("FAIL unexpected fp result"); end
      else begin
        e = fq.pop_front();
        if (fp_result !== e.v || cycle != e.due) begin
          failures++;
          $display("FAIL fp got %h exp %h at %0d due %0d", fp_result, e.v, cycle, e.due);
        end
      end
    end
  end

  // Offer one instruction in the current cycle (issue at the next edge).
  task automatic issue(op_e op, logic [63:0] a, logic [63:0] b, logic [5:0] sh);
    in_valid = 1;
    in_instr = '{op: op, shamt: sh, a: a, b: b};
    // this cycle number + 1 is the stage-1 cycle
    if (op == OP_FPADD) begin fq.push_back('{fp_ref(a, b), cycle + 3}); n_fp++; end
    else begin iq.push_back('{int_ref(op, a, b, sh), cycle + 1}); n_int++; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic idle();
    @(negedge clk);
  endtask

  task automatic rand_int(bit no_shift, bit no_add);
    op_e op;
    do op = op_e'($urandom % 8);
    while ((no_shift && op inside {OP_SLL, OP_SRL}) || (no_add && op inside {OP_ADD, OP_SUB}));
    issue(op, {$urandom, $urandom}, {$urandom, $urandom}, 6'($urandom));
  endtask

  initial begin
    logic [63:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 20; round++) begin
      // integer mode
      for (int k = 0; k < 30; k++) rand_int(0, 0);
      // switch to FP: stage 1 is rewritten while an ADD is in stage 1,
      // stage 2 while the first FP-ADD is in stage 1
      issue(OP_ADD, {$urandom, $urandom}, {$urandom, $urandom}, 0);
      rs1_load = 1; rs1_cfg = MODE_FP;
      x = rand_fp(64'h3FF0_0000_0000_0000); y = rand_fp(x);
      issue(OP_FPADD, x, y, 0);
      rs1_load = 0;
      rs2_load = 1; rs2_cfg = MODE_FP;
      x = rand_fp(x); y = rand_fp(x);
      issue(OP_FPADD, x, y, 0);
      rs2_load = 0;
      for (int k = 0; k < 40; k++) begin
        if (k % 7 == 3) begin rand_int(1, 1); n_log_in_fp++; end
        else if (k % 5 == 1) begin
          // rounding tie decided only by bits lost in the alignment shift:
          // y's hidden one lands on the round bit, its set bits below it
          // all leave the word
          x = {$urandom, $urandom};
          x[62:52] = 11'(900 + $urandom % 200);
          x[0] = 1'b0;
          y = {x[63] ^ k[1], x[62:52] - 11'd53, 52'd1 << ($urandom % 20)};
          issue(OP_FPADD, x, y, 0);
          n_tie++;
        end
        else begin x = rand_fp(x); y = rand_fp(x); issue(OP_FPADD, x, y, 0); end
      end
      // switch back: stage 1 while a LOG is in stage 1, stage 2 the next
      // cycle, once the last FP-ADD has left the adder
      issue(OP_XOR, {$urandom, $urandom}, {$urandom, $urandom}, 0);
      n_log_in_fp++;
      rs1_load = 1; rs1_cfg = MODE_INT;
      issue(OP_SLL, {$urandom, $urandom}, {$urandom, $urandom}, 6'($urandom));
      rs1_load = 0;
      rs2_load = 1; rs2_cfg = MODE_INT;
      issue(OP_OR, {$urandom, $urandom}, {$urandom, $urandom}, 0);
      rs2_load = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (iq.size() != 0 || fq.size() != 0 || n_log_in_fp == 0) begin
      failures++;
      $display("FAIL results missing: %0d int %0d fp", iq.size(), fq.size());
    end
    $display("int ops %0d, fp adds %0d (sticky-decided ties %0d), logic ops in FP mode %0d", n_int, n_fp, n_tie, n_log_in_fp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
