// vp_fir: TAPS-tap FIR filter built from variable-precision pipelined
// multipliers and a pipelined adder chain (transposed form).
//
// Each sample x is broadcast to TAPS multipliers (vp_mult, MULT_STAGES
// pipeline stages each). The sample is the operand whose precision drives the
// clock gating, so small samples leave the upper multiplier stages idle; the
// coefficient h[k] is the other operand. The products run into a chain of
// registered adders (vp_adder): the product of the last tap is registered,
// then each further register adds the product of the next lower tap to the
// value passed along the chain, so the chain register after tap 0 holds
// y(n) = sum_k h[k] * x(n-k). Because every multiplier has the same fixed
// latency, the delay elements of the chain keep the taps aligned.
//
// Interface: unsigned W-bit sample x and coefficients h[] sampled at every
// rising edge of clk, one sample per cycle. y, ACC_W bits wide so no sum can
// overflow, is the filtered value of the sample taken LATENCY = MULT_STAGES+1
// rising edges earlier (that edge counted as the first). rst is synchronous,
// active high, and clears the pipeline (the filter state starts at zero).
// mult_stage_en and add_hi_en show the register loads of each multiplier
// stage and of each adder's upper half in the current cycle.
//
// From the published design: 8 taps, 8-bit words, variable-precision
// multipliers split into two pipeline stages, pipelined adders with delay
// elements between them (the transposed arrangement follows its block
// diagram). Own choices: unsigned arithmetic, the accumulator width, which
// operand is gated, coefficients given as ports rather than fixed.
module vp_fir #(
  parameter int unsigned TAPS        = lpfir_pkg::VP_TAPS,
  parameter int unsigned W           = lpfir_pkg::VP_W,
  parameter int unsigned MULT_STAGES = lpfir_pkg::VP_MULT_STAGES,
  parameter int unsigned ACC_W       = 2 * W + $clog2(TAPS)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [W-1:0]           x,
  input  logic [W-1:0]           h            [TAPS],
  output logic [ACC_W-1:0]       y,
  output logic [MULT_STAGES-1:0] mult_stage_en[TAPS],
  output logic [TAPS-2:0]        add_hi_en
);

  logic [2*W-1:0]   prod [TAPS];
  logic [ACC_W-1:0] chain[TAPS];   // chain[j]: register after the j-th adder

  for (genvar k = 0; k < TAPS; k++) begin : g_mult
    vp_mult #(.W(W), .STAGES(MULT_STAGES)) u_mult (
      .clk     (clk),
      .rst     (rst),
      .a       (h[k]),
      .b       (x),
      .p       (prod[k]),
      .stage_en(mult_stage_en[k])
    );
  end

  // First delay element of the chain: product of the highest tap.
  always_ff @(posedge clk) begin
    if (rst) chain[0] <= '0;
    else     chain[0] <= ACC_W'(prod[TAPS-1]);
  end

  for (genvar j = 1; j < TAPS; j++) begin : g_add
    vp_adder #(.W(ACC_W)) u_add (
      .clk  (clk),
      .rst  (rst),
      .a    (chain[j-1]),
      .b    (ACC_W'(prod[TAPS-1-j])),
      .sum  (chain[j]),
      .hi_en(add_hi_en[j-1])
    );
  end

  assign y = chain[TAPS-1];

endmodule
