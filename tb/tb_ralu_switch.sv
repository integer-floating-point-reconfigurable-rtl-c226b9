// tb_ralu_switch: checks that the switch connects the input chosen by the
// last configuration written, holds it while load is low, and comes out of
// reset on i2.
module tb_ralu_switch;
  logic       clk = 0, rst_n = 0, load = 0, cfg = 0, m;
  logic [7:0] i1, i2, y;
  logic       model;
  int checks = 0, failures = 0;

  ralu_switch #(.W(8)) dut (.clk, .rst_n, .load, .cfg, .i1, .i2, .y, .m);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    i1 = 8'hA5; i2 = 8'h3C;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== i2 || m !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      cfg  = 1'($urandom);
      i1   = 8'($urandom);
      i2   = 8'($urandom);
      @(posedge clk);
      if (load) model = cfg;
      #1;
      checks++;
      if (y !== (model ? i1 : i2) || m !== model) begin
        failures++;
        $display("FAIL i=%0d y=%h model=%b", i, y, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
