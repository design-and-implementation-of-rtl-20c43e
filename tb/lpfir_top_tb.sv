// lpfir_top_tb: end-to-end testbench of both filters at their default sizes.
//
// The two filters run at the same time from one clock, each with its own
// random coefficients and samples, over several runs separated by a reset.
// The variable-precision filter's output is checked against
// sum_k h[k] * x(n-k) three cycles after x(n) (unsigned, 19 bits); the DPDT
// filter's output against the signed 32-bit sum right after the edge that
// takes x(n). Each mechanism is counted and must occur at least once:
//   VP:   multiplier with both stages gated (sample 0), with its second stage
//         gated and the result taken from the bypass row (sample below 16),
//         full precision, adder upper half gated, adder upper half live;
//   DPDT: Booth latches closed, multiplier DPDT adders closed, chain DPDT
//         adders closed and open; and reset clearing both filters' state.
module lpfir_top_tb;
  import lpfir_pkg::*;
  localparam int unsigned N = 400, RUNS = 4, VP_LAT = VP_MULT_STAGES + 1;

  logic clk = 1'b0;
  logic rst;
  logic [VP_W-1:0]           vp_x;
  logic [VP_W-1:0]           vp_h [VP_TAPS];
  logic [VP_ACC_W-1:0]       vp_y;
  logic [VP_MULT_STAGES-1:0] vp_mult_stage_en [VP_TAPS];
  logic [VP_TAPS-2:0]        vp_add_hi_en;
  logic [DP_XW-1:0]          dp_x;
  logic [DP_HW-1:0]          dp_h [DP_TAPS];
  logic [DP_YW-1:0]          dp_y;
  logic [1:0]                dp_mult_ppg_close [DP_TAPS];
  logic [2:0]                dp_mult_add_close [DP_TAPS];
  logic [DP_TAPS-2:0]        dp_add_close;

  int vx [N], dx [N];
  int checks = 0, failures = 0;
  int n_all_gated = 0, n_bypass = 0, n_full = 0, n_hi_gated = 0, n_hi_live = 0;
  int n_ppg_closed = 0, n_madd_closed = 0, n_da_closed = 0, n_da_open = 0, n_reset = 0;

  lpfir_top u_top (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int vp_ref(int m);
    int s = 0;
    for (int k = 0; k < VP_TAPS; k++) if (m - k >= 0) s += int'(vp_h[k]) * vx[m-k];
    return s;
  endfunction

  function automatic int dp_ref(int m);
    int s = 0;
    for (int k = 0; k < DP_TAPS; k++) if (m - k >= 0) s += int'($signed(dp_h[k])) * dx[m-k];
    return s;
  endfunction

  // Mechanism counters, sampled between edges.
  always @(negedge clk) if (!rst) begin
    // stage 1 of tap 0 sees the newest sample
    if (!vp_mult_stage_en[0][0]) n_all_gated++;
    if (vp_mult_stage_en[0][0] && !vp_mult_stage_en[0][1]) n_bypass++;
    if (vp_mult_stage_en[0][1]) n_full++;
    n_hi_gated += VP_TAPS - 1 - $countones(vp_add_hi_en);
    n_hi_live  += $countones(vp_add_hi_en);
    for (int k = 0; k < DP_TAPS; k++) begin
      n_ppg_closed  += $countones(dp_mult_ppg_close[k]);
      n_madd_closed += $countones(dp_mult_add_close[k]);
    end
    n_da_closed += $countones(dp_add_close);
    n_da_open   += DP_TAPS - 1 - $countones(dp_add_close);
  end

  initial begin
    for (int run = 0; run < RUNS; run++) begin
      rst = 1'b1; vp_x = '0; dp_x = '0;
      foreach (vp_h[k]) vp_h[k] = VP_W'($urandom);
      foreach (dp_h[k]) do dp_h[k] = DP_HW'($urandom); while (dp_h[k] == 16'h8000);
      if (run == 1) foreach (dp_h[k]) dp_h[k] = DP_HW'($signed(5'($urandom)));
      repeat (2) @(negedge clk);
      // reset must have cleared both filters
      checks++;
      if (vp_y != '0 || dp_y != '0) begin failures++; $display("reset left state"); end
      else n_reset++;
      rst = 1'b0;
      for (int m = 0; m < N; m++) begin
        case ($urandom_range(0, 3))
          0: vx[m] = 0;
          1: vx[m] = $urandom_range(1, 15);
          default: vx[m] = $urandom_range(0, 255);
        endcase
        dx[m] = ($urandom_range(0, 1) == 0) ? $urandom_range(0, 3) - 2 : int'($signed(8'($urandom)));
        vp_x = VP_W'(vx[m]);
        dp_x = DP_XW'(dx[m]);
        if (m >= VP_LAT) begin
          checks++;
          if (int'(vp_y) != vp_ref(m - VP_LAT)) begin
            failures++; $display("VP run %0d sample %0d: got %0d exp %0d", run, m - VP_LAT, vp_y, vp_ref(m - VP_LAT));
          end
        end
        @(negedge clk);
        checks++;
        if (dp_y != DP_YW'(dp_ref(m))) begin
          failures++; $display("DPDT run %0d sample %0d: got %0d exp %0d", run, m, $signed(dp_y), dp_ref(m));
        end
      end
    end
    $display("VP: all stages gated=%0d bypass=%0d full=%0d adder hi gated=%0d live=%0d",
             n_all_gated, n_bypass, n_full, n_hi_gated, n_hi_live);
    $display("DPDT: booth latches closed=%0d mult adders closed=%0d chain adders closed=%0d open=%0d; resets=%0d",
             n_ppg_closed, n_madd_closed, n_da_closed, n_da_open, n_reset);
    if (n_all_gated == 0) failures++;
    if (n_bypass == 0)    failures++;
    if (n_full == 0)      failures++;
    if (n_hi_gated == 0)  failures++;
    if (n_hi_live == 0)   failures++;
    if (n_ppg_closed == 0)  failures++;
    if (n_madd_closed == 0) failures++;
    if (n_da_closed == 0)   failures++;
    if (n_da_open == 0)     failures++;
    if (n_reset == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
