// vp_mult_tb: self-checking testbench of the variable-precision multiplier.
//
// Two instances run side by side: four stages of 2-bit digits (default) and
// two stages of 4-bit digits (as used in the FIR filter). Operands change on
// the falling edge, one product per cycle, with b drawn so that every
// precision occurs. Each product is compared with a*b exactly STAGES cycles
// after its operands were taken (fixed latency). The testbench also checks
// the gating: a register stage must load exactly when the operand needs it,
// and a gated stage's registers must not change. 255*255 = 0xFE01 is
// applied first.
module vp_mult_tb;
  localparam int unsigned W = 8;
  localparam int unsigned N = 3000;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p4, p2;
  logic [3:0] en4;
  logic [1:0] en2;

  int checks = 0, failures = 0;
  int gated_stage_cycles = 0, bypass_results = 0, full_results = 0;

  vp_mult #(.W(W))              u_dut4 (.clk, .rst, .a, .b, .p(p4), .stage_en(en4));
  vp_mult #(.W(W), .STAGES(2))  u_dut2 (.clk, .rst, .a, .b, .p(p2), .stage_en(en2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*W-1:0] exp_q [N];
  int unsigned    last4_q[N];

  function automatic int unsigned last_stage(logic [W-1:0] v, int unsigned stages);
    int unsigned g = W / stages;
    last_stage = 0;
    for (int unsigned k = 0; k < stages; k++)
      if (((v >> (k * g)) & ((1 << g) - 1)) != 0) last_stage = k + 1;
  endfunction

  logic [3:0]     en_now;
  logic [2*W-1:0] acc_before [4];

  initial begin
    rst = 1'b1; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      // operands for cycle n
      if (n == 0) begin a = 8'hFF; b = 8'hFF; end
      else begin
        a = W'($urandom);
        case ($urandom_range(0, 4))
          0: b = '0;
          1: b = W'($urandom_range(1, 3));
          2: b = W'($urandom_range(1, 15));
          3: b = W'($urandom_range(1, 63));
          default: b = W'($urandom);
        endcase
      end
      #1;
      exp_q[n]   = (2*W)'(a) * (2*W)'(b);
      last4_q[n] = last_stage(b, 4);
      // stage 1 load decision for the operands just applied
      checks++;
      if (en4[0] != (last4_q[n] >= 1)) begin
        failures++; $display("stage 1 enable wrong at n=%0d", n);
      end
      if (n == 0) begin
        checks++;
        if (exp_q[0] != 16'hFE01) failures++;
      end
      // results: 4-stage instance after 4 cycles, 2-stage after 2
      if (n >= 4) begin
        checks++;
        if (p4 != exp_q[n-4]) begin
          failures++;
          $display("4-stage: n=%0d got %h exp %h", n - 4, p4, exp_q[n-4]);
        end
        if (last4_q[n-4] == 4) full_results++; else bypass_results++;
      end
      if (n >= 2) begin
        checks++;
        if (p2 != exp_q[n-2]) begin
          failures++;
          $display("2-stage: n=%0d got %h exp %h", n - 2, p2, exp_q[n-2]);
        end
      end
      // later stages of the 4-stage instance: stage k holds operand n-(k-1)
      for (int k = 2; k <= 4; k++) begin
        if (n >= k - 1) begin
          checks++;
          if (en4[k-1] != (last4_q[n-k+1] >= k)) begin
            failures++; $display("stage %0d enable wrong at n=%0d", k, n);
          end
          if (!en4[k-1]) gated_stage_cycles++;
        end
      end
      // a gated stage must hold its registers
      begin
        en_now = en4;
        for (int k = 0; k < 4; k++) acc_before[k] = u_dut4.acc_r[k];
        @(negedge clk);
        for (int k = 0; k < 4; k++) if (!en_now[k]) begin
          checks++;
          if (u_dut4.acc_r[k] != acc_before[k]) begin
            failures++; $display("gated stage %0d changed", k + 1);
          end
        end
      end
    end
    if (gated_stage_cycles == 0) failures++;
    if (bypass_results == 0 || full_results == 0) failures++;
    $display("gated stage-cycles=%0d bypass results=%0d full-precision results=%0d",
             gated_stage_cycles, bypass_results, full_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
