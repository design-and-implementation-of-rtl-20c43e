// vp_mult: variable-precision pipelined multiplier with two-dimensional
// fine-grain clock gating.
//
// The unsigned product a*b is built in STAGES pipeline stages. Stage k
// (1..STAGES) owns one G-bit digit of b (G = W/STAGES) and adds a*digit,
// shifted to its weight, to the running sum. A precision detector finds the
// last stage L whose digit (or any digit above it) is non-zero; L = 0 when b is
// zero. The pipeline registers in front of stage k load only when L >= k: the
// registers of stages the operand does not need keep their contents, so they
// and the logic behind them do not switch (the clock enable stands for the
// gated clock of a clock-gating cell). The masks (the value L) travel down
// their own, always-clocked register row beside the data.
//
// To keep the latency fixed, the sum of the last active stage is dropped into
// a bypass register row (one register per stage boundary) and travels to the
// output with the data, and the output multiplexer picks the final stage when
// all stages were active and the bypass row otherwise.
//
// Interface (STAGES >= 2, dividing W): a, b sampled at every rising edge of clk; p is valid STAGES
// rising edges later (the edge that samples a, b counts as the first) and a new
// product can start every cycle. rst is synchronous and active high.
// stage_en shows which register stages load in the current cycle.
//
// From the published design: the stage/mask/bypass/multiplexer organisation,
// the 8-bit unsigned operands (its simulation multiplies FF by FF into FE01).
// Own choices: the digit-per-stage split of b, the precision rule, clock
// enables in place of gated clocks, the synchronous reset.
module vp_mult #(
  parameter int unsigned W      = 8,
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  output logic [2*W-1:0]    p,
  output logic [STAGES-1:0] stage_en
);

  localparam int unsigned G  = W / STAGES;
  localparam int unsigned LW = $clog2(STAGES + 1);

  // Precision detection: last stage whose digit of b is needed.
  logic [LW-1:0] last_in;
  always_comb begin
    last_in = '0;
    for (int unsigned k = 0; k < STAGES; k++)
      if (b[k*G +: G] != '0) last_in = LW'(k + 1);
  end

  // Pipeline register rows, index k-1 for register stage k.
  logic [W-1:0]   a_r   [STAGES];
  logic [W-1:0]   b_r   [STAGES];
  logic [2*W-1:0] acc_r [STAGES];
  logic [LW-1:0]  last_r[STAGES];   // mask row, always clocked
  logic [2*W-1:0] fb_out[STAGES];   // functional block outputs
  logic [2*W-1:0] byp_r [STAGES-1]; // byp_r[k-1]: bypass register after stage k

  // Mask decoding: register stage k loads when the operand needs stage k.
  always_comb begin
    stage_en[0] = (last_in >= LW'(1));
    for (int unsigned k = 1; k < STAGES; k++)
      stage_en[k] = (last_r[k-1] >= LW'(k + 1));
  end

  // Functional blocks: add one shifted partial product each.
  always_comb begin
    for (int unsigned k = 0; k < STAGES; k++)
      fb_out[k] = acc_r[k] + ((2*W)'(a_r[k]) * (2*W)'(b_r[k][k*G +: G]) << (k*G));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < STAGES; k++) begin
        a_r[k]    <= '0;
        b_r[k]    <= '0;
        acc_r[k]  <= '0;
        last_r[k] <= '0;
      end
      for (int unsigned k = 0; k < STAGES - 1; k++) byp_r[k] <= '0;
    end else begin
      // Register stage 1 takes the operands.
      last_r[0] <= last_in;
      if (stage_en[0]) begin
        a_r[0]   <= a;
        b_r[0]   <= b;
        acc_r[0] <= '0;
      end
      for (int unsigned k = 1; k < STAGES; k++) begin
        last_r[k] <= last_r[k-1];
        if (stage_en[k]) begin
          a_r[k]   <= a_r[k-1];
          b_r[k]   <= b_r[k-1];
          acc_r[k] <= fb_out[k-1];
        end
      end
      // Bypass row: capture the result of the stage that finished last,
      // otherwise pass on what the row already carries (zero for b = 0).
      byp_r[0] <= (last_r[0] == LW'(1)) ? fb_out[0] : '0;
      for (int unsigned k = 2; k < STAGES; k++)
        byp_r[k-1] <= (last_r[k-1] == LW'(k)) ? fb_out[k-1] : byp_r[k-2];
    end
  end

  // Output multiplexer.
  assign p = (last_r[STAGES-1] == LW'(STAGES)) ? fb_out[STAGES-1] : byp_r[STAGES-2];

  initial assert (STAGES >= 2 && W % STAGES == 0)
    else $error("vp_mult: STAGES must be at least 2 and divide W");

endmodule
