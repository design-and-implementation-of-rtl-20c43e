// vp_adder: registered unsigned adder with a gated upper half, the
// variable-precision adder of the pipelined FIR filter.
//
// The W-bit sum is split at LO_W. The lower half is added and registered
// every cycle. The upper half register loads only when it is needed: when
// either operand has a non-zero upper bit or the lower half carries out. A
// one-bit flag registered beside the sum tells the output multiplexer whether
// the upper half is live; when it is not, the output shows zeros there while the
// register keeps its old contents and does not switch.
//
// Interface: a and b are sampled at each rising edge of clk; sum = a + b
// (mod 2^W) appears after that edge, one cycle of latency. hi_en shows, in
// the current cycle, whether the upper register is loading. rst is
// synchronous and active high.
//
// From the published design: a variable-precision adder used in the pipelined
// adder chain of the FIR filter. The published text names this adder but does
// not give its inside; the split at the middle, the need rule and the output
// multiplexer are this design's own, modelled on the gating of the
// multiplier.
module vp_adder #(
  parameter int unsigned W    = 16,
  parameter int unsigned LO_W = W / 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         hi_en
);

  localparam int unsigned HI_W = W - LO_W;

  logic [LO_W:0]     lo_sum;
  logic [LO_W-1:0]   lo_r;
  logic [HI_W-1:0]   hi_r;
  logic              hi_live_r;

  assign lo_sum = {1'b0, a[LO_W-1:0]} + {1'b0, b[LO_W-1:0]};
  assign hi_en  = (a[W-1:LO_W] != '0) || (b[W-1:LO_W] != '0) || lo_sum[LO_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      lo_r      <= '0;
      hi_r      <= '0;
      hi_live_r <= 1'b0;
    end else begin
      lo_r      <= lo_sum[LO_W-1:0];
      hi_live_r <= hi_en;
      if (hi_en) hi_r <= a[W-1:LO_W] + b[W-1:LO_W] + HI_W'(lo_sum[LO_W]);
    end
  end

  assign sum = {hi_live_r ? hi_r : HI_W'(0), lo_r};

endmodule
