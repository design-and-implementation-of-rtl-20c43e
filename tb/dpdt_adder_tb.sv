// dpdt_adder_tb: self-checking testbench of the DPDT two's complement adder.
//
// The 16-bit adder (cut 8/8) and a 20-bit instance (cut 10/10, as in the
// Booth multiplier) get operands that fit the lower part (MSP closed) and
// operands that do not (MSP open), with random carry in. sum, cout and
// cout_lsp are compared with a plain W-bit addition, close with the range
// rule, and while closed the MSP operand latches must keep their contents.
// The two operand pairs shown in the published waveform (0080h + 0040h and
// 0080h + 00C0h) are applied first.
module dpdt_adder_tb;
  localparam int unsigned N = 6000;

  logic [15:0] a, b, sum;
  logic        cin, cout, cout_lsp, close;
  logic [19:0] a20, b20, sum20;
  logic        cout20, coutl20, close20;
  logic [16:0] ref17;
  logic [8:0]  refl;
  logic [20:0] ref21;
  logic [7:0]  msp_a_before;
  logic        exp_close;
  int checks = 0, failures = 0, closed = 0, opened = 0;

  dpdt_adder u_dut (.a, .b, .cin, .sum, .cout, .cout_lsp, .close);
  dpdt_adder #(.W(20), .LSP_W(10)) u_dut20 (
    .a(a20), .b(b20), .cin(1'b0), .sum(sum20), .cout(cout20), .cout_lsp(coutl20), .close(close20)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] small16();
    return 16'($signed(8'($urandom)));
  endfunction

  task automatic check16(input string tag);
    ref17 = {1'b0, a} + {1'b0, b} + 17'(cin);
    refl  = {1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(cin);
    exp_close = ((a[15:7] == '0) || (a[15:7] == '1)) && ((b[15:7] == '0) || (b[15:7] == '1));
    checks++;
    if ({cout, sum} != ref17 || cout_lsp != refl[8] || close != exp_close) begin
      failures++;
      $display("%s: %h+%h+%0d got %0d/%h lsp %0d close %0d, exp %h close %0d",
               tag, a, b, cin, cout, sum, cout_lsp, close, ref17, exp_close);
    end
    if (close) closed++; else opened++;
  endtask

  initial begin
    // Published waveform operands
    cin = 1'b0; a = 16'h0080; b = 16'h0040; a20 = '0; b20 = '0;
    #1;
    check16("fig a");
    checks++; if (sum != 16'h00C0 || cout_lsp != 1'b0) failures++;
    b = 16'h00C0;
    #1;
    check16("fig b");
    checks++; if (sum != 16'h0140 || cout_lsp != 1'b1) failures++;

    for (int n = 0; n < N; n++) begin
      cin = 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin a = small16(); b = small16(); end
        1: begin a = small16(); b = 16'($urandom); end
        2: begin a = 16'($urandom); b = small16(); end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      if ($urandom_range(0, 1) == 0) begin
        a20 = 20'($signed(10'($urandom))); b20 = 20'($signed(10'($urandom)));
      end else begin
        a20 = 20'($urandom); b20 = 20'($urandom);
      end
      msp_a_before = u_dut.a_msp_l;
      #1;
      check16("rand");
      if (close) begin
        checks++;
        if (u_dut.a_msp_l != msp_a_before) begin
          failures++; $display("closed MSP latch changed");
        end
      end
      ref21 = {1'b0, a20} + {1'b0, b20};
      checks++;
      if ({cout20, sum20} != ref21) begin
        failures++; $display("20-bit: %h+%h got %h", a20, b20, sum20);
      end
    end
    if (closed == 0 || opened == 0) failures++;
    $display("MSP closed=%0d open=%0d", closed, opened);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
