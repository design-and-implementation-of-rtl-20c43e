// booth_ppg_tb: self-checking testbench of the Booth partial product
// generator.
//
// For random signed operands (a never -32768, b often sign-extended from
// 8 or 12 bits) every partial product must equal digit_i * a, where digit_i
// in {-2,-1,0,1,2} is worked out here from b, the weighted sum of the partial
// products must equal a * b, the close flags must follow the upper bits of b,
// and a closed latch group must keep its contents.
module booth_ppg_tb;
  localparam int unsigned N = 5000;

  logic [15:0] a, b;
  logic [16:0] pp [8];
  logic close1, close2;
  logic [67:0] lat1_before, lat2_before;
  int checks = 0, failures = 0, c1 = 0, c2 = 0;

  booth_ppg u_dut (.a, .b, .pp, .close1, .close2);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [15:0] v, int i);
    int lo = (i == 0) ? 0 : int'(v[2*i-1]);
    return lo + int'(v[2*i]) - 2 * int'(v[2*i+1]);
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      do a = 16'($urandom); while (a == 16'h8000);
      case ($urandom_range(0, 2))
        0: b = 16'($signed(8'($urandom)));
        1: b = 16'($signed(12'($urandom)));
        default: b = 16'($urandom);
      endcase
      lat1_before = u_dut.mult_l1;
      lat2_before = u_dut.mult_l2;
      #1;
      begin
        longint acc;
        acc = 0;
        for (int i = 0; i < 8; i++) begin
          longint expv;
          expv = longint'(digit(b, i)) * longint'($signed(a));
          checks++;
          if (longint'($signed(pp[i])) != expv) begin
            failures++; $display("pp%0d wrong: a=%h b=%h got %h", i, a, b, pp[i]);
          end
          acc += longint'($signed(pp[i])) <<< (2 * i);
        end
        checks++;
        if (acc != longint'($signed(a)) * longint'($signed(b))) begin
          failures++; $display("sum wrong a=%h b=%h", a, b);
        end
      end
      checks++;
      if (close1 != ((b[15:11] == '0) || (b[15:11] == '1)) ||
          close2 != ((b[15:7] == '0) || (b[15:7] == '1))) begin
        failures++; $display("close flags wrong b=%h", b);
      end
      if (close1) begin
        c1++; checks++;
        if (u_dut.mult_l1 != lat1_before) begin failures++; $display("latch 1 moved"); end
      end
      if (close2) begin
        c2++; checks++;
        if (u_dut.mult_l2 != lat2_before) begin failures++; $display("latch 2 moved"); end
      end
    end
    if (c1 == 0 || c2 == 0 || c2 == N) failures++;
    $display("close1=%0d close2=%0d of %0d", c1, c2, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
