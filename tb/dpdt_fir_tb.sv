// dpdt_fir_tb: self-checking testbench of the DPDT FIR filter at its
// default size (8 taps, 8-bit signed input, 16-bit coefficients, 32-bit
// output).
//
// The first run uses h0 = h7 = -47 (the outer coefficients shown in the
// published simulation) with random inner coefficients and the ramp 0, 1, 2,
// 3, ... as input; later runs use random coefficients and random signed
// samples. After each rising edge y must equal sum_k h[k] * x(n-k) for the
// sample just taken, computed here. The testbench counts closed and open
// states of the Booth latches, the multiplier DPDT adders and the chain
// adders. With an 8-bit sample the upper Booth digits are always zero, so the
// latches and multiplier DPDT adders must be closed throughout; the chain
// adders must be seen both closed and open.
module dpdt_fir_tb;
  localparam int unsigned TAPS = 8, N = 500;

  logic clk = 1'b0;
  logic rst;
  logic [7:0]  x;
  logic [15:0] h [TAPS];
  logic [31:0] y;
  logic [1:0]  ppg_close [TAPS];
  logic [2:0]  madd_close [TAPS];
  logic [TAPS-2:0] add_close;
  int xs [N];
  int checks = 0, failures = 0;
  int ppg_c = 0, ppg_o = 0, madd_c = 0, madd_o = 0, add_c = 0, add_o = 0;

  dpdt_fir u_dut (.clk, .rst, .x, .h, .y, .mult_ppg_close(ppg_close),
                  .mult_add_close(madd_close), .add_close);

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
      if (m - k >= 0) s += int'($signed(h[k])) * xs[m-k];
    return s;
  endfunction

  always @(negedge clk) if (!rst) begin
    for (int k = 0; k < TAPS; k++) begin
      ppg_c  += $countones(ppg_close[k]);  ppg_o  += 2 - $countones(ppg_close[k]);
      madd_c += $countones(madd_close[k]); madd_o += 3 - $countones(madd_close[k]);
    end
    add_c += $countones(add_close); add_o += TAPS - 1 - $countones(add_close);
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      rst = 1'b1; x = '0;
      foreach (h[k]) begin
        do h[k] = 16'($urandom); while (h[k] == 16'h8000);
      end
      if (run == 0) begin h[0] = 16'hFFD1; h[TAPS-1] = 16'hFFD1; end
      if (run == 2) foreach (h[k]) h[k] = 16'($signed(6'($urandom)));
      repeat (2) @(negedge clk);
      rst = 1'b0;
      for (int m = 0; m < N; m++) begin
        xs[m] = (run == 0 && m < 100) ? m : int'($signed(8'($urandom)));
        x = 8'(xs[m]);
        @(negedge clk);
        checks++;
        if (y != 32'(ref_y(m))) begin
          failures++; $display("run %0d sample %0d: got %0d exp %0d", run, m, $signed(y), ref_y(m));
        end
      end
    end
    // An 8-bit sample never needs the upper Booth digits: those parts must
    // stay closed throughout, while the chain adders must do both.
    checks++;
    if (ppg_o != 0 || madd_o != 0 || ppg_c == 0) failures++;
    if (add_c == 0 || add_o == 0) failures++;
    $display("booth latches closed=%0d open=%0d, mult DPDT adders closed=%0d open=%0d, chain adders closed=%0d open=%0d",
             ppg_c, ppg_o, madd_c, madd_o, add_c, add_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
