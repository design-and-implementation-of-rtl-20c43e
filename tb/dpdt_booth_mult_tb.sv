// dpdt_booth_mult_tb: self-checking testbench of the 16x16 DPDT Booth
// multiplier.
//
// Random signed operands (a never -32768; b sign-extended from 8 bits, from
// 12 bits or full width) plus the corner values 32767, -32767, -1, 0 are
// multiplied; p must equal the 32-bit product. The testbench counts how
// often the generator latches and the DPDT adders D1, D2, D3 are closed and
// open, and fails if either state never occurs; with b fitting 8 bits every
// upper part must be closed.
module dpdt_booth_mult_tb;
  localparam int unsigned N = 6000;

  logic [15:0] a, b;
  logic [31:0] p;
  logic [1:0]  ppg_close;
  logic [2:0]  add_close;
  logic        small_b;
  int checks = 0, failures = 0;
  int closed_cnt[5], open_cnt[5];
  logic [15:0] corner [4] = '{16'h7FFF, 16'h8001, 16'hFFFF, 16'h0000};

  dpdt_booth_mult u_dut (.a, .b, .p, .ppg_close, .add_close);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (closed_cnt[i]) begin closed_cnt[i] = 0; open_cnt[i] = 0; end
    for (int n = 0; n < N; n++) begin
      if (n < 16) begin
        a = corner[n % 4]; b = corner[n / 4];
      end else begin
        do a = 16'($urandom); while (a == 16'h8000);
        case ($urandom_range(0, 2))
          0: b = 16'($signed(8'($urandom)));
          1: b = 16'($signed(12'($urandom)));
          default: b = 16'($urandom);
        endcase
      end
      small_b = (b[15:7] == '0) || (b[15:7] == '1);
      #1;
      checks++;
      if (p != 32'($signed(a) * $signed(b))) begin
        failures++; $display("%0d * %0d gave %0d", $signed(a), $signed(b), $signed(p));
      end
      if (small_b) begin
        checks++;
        if (ppg_close != 2'b11 || add_close != 3'b111) begin
          failures++; $display("upper parts not all closed for b=%h", b);
        end
      end
      for (int i = 0; i < 5; i++) begin
        logic c;
        c = (i < 2) ? ppg_close[i] : add_close[i-2];
        if (c) closed_cnt[i]++; else open_cnt[i]++;
      end
    end
    for (int i = 0; i < 5; i++) begin
      if (closed_cnt[i] == 0 || open_cnt[i] == 0) failures++;
      $display("close flag %0d: closed %0d open %0d", i, closed_cnt[i], open_cnt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
