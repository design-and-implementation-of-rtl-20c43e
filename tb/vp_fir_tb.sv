// vp_fir_tb: self-checking testbench of the variable-precision FIR filter at
// its default size (8 taps, 8-bit words, two-stage multipliers).
//
// Three runs with fresh random coefficients, each starting from reset, feed
// one sample per cycle; samples are drawn from 2-, 4- and 8-bit ranges so that
// multiplier stages and adder upper halves are both gated and active. The
// output must equal sum_k h[k] * x(n-k), computed here, exactly LATENCY = 3
// cycles after x(n) was taken; the testbench counts gated multiplier stages,
// gated and live adder upper halves, and fails if any never occurs.
module vp_fir_tb;
  localparam int unsigned TAPS = 8, W = 8, ACC_W = 19, LAT = 3, N = 600;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] x;
  logic [W-1:0] h [TAPS];
  logic [ACC_W-1:0] y;
  logic [1:0] mult_en [TAPS];
  logic [TAPS-2:0] add_hi;
  int xs [N];
  int checks = 0, failures = 0, mult_gated = 0, add_gated = 0, add_live = 0;

  vp_fir u_dut (.clk, .rst, .x, .h, .y, .mult_stage_en(mult_en), .add_hi_en(add_hi));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int m);
    int s = 0;
    for (int k = 0; k < TAPS; k++)
      if (m - k >= 0) s += int'(h[k]) * xs[m-k];
    return s;
  endfunction

  always @(negedge clk) if (!rst) begin
    foreach (mult_en[k]) if (mult_en[k] != 2'b11) mult_gated++;
    add_gated += TAPS - 1 - $countones(add_hi);
    add_live  += $countones(add_hi);
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      rst = 1'b1; x = '0;
      foreach (h[k]) h[k] = W'($urandom);
      repeat (3) @(negedge clk);
      rst = 1'b0;
      for (int m = 0; m < N; m++) begin
        case ($urandom_range(0, 2))
          0: xs[m] = $urandom_range(0, 3);
          1: xs[m] = $urandom_range(0, 15);
          default: xs[m] = $urandom_range(0, 255);
        endcase
        x = W'(xs[m]);
        if (m >= LAT) begin
          checks++;
          if (int'(y) != ref_y(m - LAT)) begin
            failures++; $display("run %0d sample %0d: got %0d exp %0d", run, m - LAT, y, ref_y(m - LAT));
          end
        end
        @(negedge clk);
      end
    end
    if (mult_gated == 0 || add_gated == 0 || add_live == 0) failures++;
    $display("gated multiplier cycles=%0d adder upper halves gated=%0d live=%0d",
             mult_gated, add_gated, add_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
