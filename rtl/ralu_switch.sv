// ralu_switch: one programmable switch of the R-ALU (RS1a, RS1b, RS2a, RS2b).
//
// In silicon a switch is two pass transistors joining inputs i1 and i2 to
// one output, each gated by a one-bit memory (M1, M2) that holds the
// configuration. Exactly one of the two connects. Here the memory is the
// flip-flop m: when load is high at a rising clock edge it takes cfg, and
// from then on y follows i1 (m = 1) or i2 (m = 0). The configuration is
// written one cycle ahead of its use, during a reconfiguration cycle, so the
// switch adds no setup to the operation that follows; that is the design's
// rule. The electrical side (pass-transistor resistance, resized drivers)
// is not modelled. Reset value: i2 connected (integer mode), a choice of
// this implementation.
module ralu_switch #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         cfg,
  input  logic [W-1:0] i1,
  input  logic [W-1:0] i2,
  output logic [W-1:0] y,
  output logic         m
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    m <= 1'b0;
    else if (load) m <= cfg;
  end

  assign y = m ? i1 : i2;
endmodule
