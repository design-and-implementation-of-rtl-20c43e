// vp_adder_tb: self-checking testbench of the gated registered adder.
//
// Random operands, often small so that the upper half is not needed, are
// applied on the falling edge; one cycle later the sum must equal a + b
// (mod 2^W). The testbench also checks the gating: hi_en must be high exactly
// when an upper operand bit is set or the lower half carries out, and the
// upper register must not change while hi_en is low.
module vp_adder_tb;
  localparam int unsigned W = 16;
  localparam int unsigned N = 4000;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] a, b, sum;
  logic hi_en;
  logic [W-1:0] exp_sum;
  logic exp_hi;
  logic [W/2-1:0] hi_before;
  int checks = 0, failures = 0, gated = 0, active = 0;

  vp_adder #(.W(W)) u_dut (.clk, .rst, .a, .b, .sum, .hi_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      if ($urandom_range(0, 1) == 0) begin
        a = W'($urandom_range(0, 255));
        b = W'($urandom_range(0, 255));
      end else begin
        a = W'($urandom);
        b = W'($urandom);
      end
      #1;
      exp_sum = a + b;
      exp_hi  = (a[W-1:W/2] != 0) || (b[W-1:W/2] != 0) || ({1'b0, a[W/2-1:0]} + {1'b0, b[W/2-1:0]} > 9'd255);
      checks++;
      if (hi_en != exp_hi) begin failures++; $display("hi_en wrong n=%0d", n); end
      if (exp_hi) active++; else gated++;
      hi_before = u_dut.hi_r;
      @(negedge clk);
      checks++;
      if (sum != exp_sum) begin
        failures++; $display("n=%0d %h+%h got %h", n, a, b, sum);
      end
      if (!exp_hi) begin
        checks++;
        if (u_dut.hi_r != hi_before) begin failures++; $display("gated upper half changed"); end
      end
    end
    if (gated == 0 || active == 0) failures++;
    $display("upper half gated=%0d active=%0d", gated, active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
