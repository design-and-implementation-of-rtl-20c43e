// lpfir_top: the two low-power FIR filters side by side.
//
// vp_* is the variable-precision pipelined filter: 8 taps of unsigned 8-bit
// samples and coefficients, multipliers split into two clock-gated stages,
// 19-bit output valid three clocks after its sample is taken. dp_* is the
// DPDT filter: 8 taps of signed 8-bit samples and 16-bit coefficients,
// Booth multipliers and adders with latched upper parts, 32-bit registered
// output valid after the edge that takes the sample. The two filters share
// only the clock and the synchronous, active-high reset; each has its own
// sample input, coefficient inputs, output and activity flags (which
// pipeline registers load, which upper parts are closed).
module lpfir_top
  import lpfir_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  // Variable-precision pipelined FIR
  input  logic [VP_W-1:0]           vp_x,
  input  logic [VP_W-1:0]           vp_h            [VP_TAPS],
  output logic [VP_ACC_W-1:0]       vp_y,
  output logic [VP_MULT_STAGES-1:0] vp_mult_stage_en[VP_TAPS],
  output logic [VP_TAPS-2:0]        vp_add_hi_en,
  // DPDT FIR
  input  logic [DP_XW-1:0]          dp_x,
  input  logic [DP_HW-1:0]          dp_h            [DP_TAPS],
  output logic [DP_YW-1:0]          dp_y,
  output logic [1:0]                dp_mult_ppg_close[DP_TAPS],
  output logic [2:0]                dp_mult_add_close[DP_TAPS],
  output logic [DP_TAPS-2:0]        dp_add_close
);

  vp_fir u_vp_fir (
    .clk          (clk),
    .rst          (rst),
    .x            (vp_x),
    .h            (vp_h),
    .y            (vp_y),
    .mult_stage_en(vp_mult_stage_en),
    .add_hi_en    (vp_add_hi_en)
  );

  dpdt_fir u_dpdt_fir (
    .clk           (clk),
    .rst           (rst),
    .x             (dp_x),
    .h             (dp_h),
    .y             (dp_y),
    .mult_ppg_close(dp_mult_ppg_close),
    .mult_add_close(dp_mult_add_close),
    .add_close     (dp_add_close)
  );

endmodule
