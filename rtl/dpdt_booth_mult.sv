// dpdt_booth_mult: 16x16 signed radix-4 Booth multiplier whose upper
// compression tree uses DPDT adders.
//
// booth_ppg produces eight 17-bit partial products P0..P7, Pi weighted by 4^i.
// A three-level tree adds them; in each adder the second input carries the
// larger weight and is shifted left before the addition, and the output is
// two bits (level 1), four bits (level 2) or eight bits (level 3) wider than
// its inputs:
//   level 1: A1 = P0 + P1<<2, A2 = P2 + P3<<2, D1 = P4 + P5<<2, D2 = P6 + P7<<2
//            (20 bits)
//   level 2: A3 = A1 + A2<<4, D3 = D1 + D2<<4 (24 bits)
//   level 3: A4 = A3 + D3<<8 (32 bits, the product)
// A1..A4 are ordinary adders on the least significant partial products. D1,
// D2 and D3 add the most significant partial products and are DPDT adders
// (dpdt_adder, cut in the middle): when b is small its upper Booth digits are
// zero, the upper partial products are zero, and those adders close their
// upper halves.
//
// Interface: combinational; p = a * b for signed a, b except a = -2^15
// (see booth_ppg). ppg_close = {close1, close2} of the generator and
// add_close = {D3, D2, D1} close flags show which parts are switched off.
//
// From the published design: the tree shape, adder names, which adders are
// DPDT adders, the shifts and the widths 17/20/24/32. Own choices: the
// LSP/MSP cut of each DPDT adder (at half its width).
module dpdt_booth_mult #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 16
) (
  input  logic [AW-1:0]      a,
  input  logic [BW-1:0]      b,
  output logic [AW+BW-1:0]   p,
  output logic [1:0]         ppg_close,
  output logic [2:0]         add_close
);

  localparam int unsigned PP_W = AW + 1;   // 17
  localparam int unsigned L1_W = PP_W + 3; // 20
  localparam int unsigned L2_W = L1_W + 4; // 24
  localparam int unsigned PW   = AW + BW;  // 32

  logic [PP_W-1:0] pp [8];

  booth_ppg #(.AW(AW), .BW(BW)) u_ppg (
    .a     (a),
    .b     (b),
    .pp    (pp),
    .close1(ppg_close[1]),
    .close2(ppg_close[0])
  );

  function automatic logic [L1_W-1:0] sx1(input logic [PP_W-1:0] v);
    return L1_W'($signed(v));
  endfunction
  function automatic logic [L2_W-1:0] sx2(input logic [L1_W-1:0] v);
    return L2_W'($signed(v));
  endfunction

  // Level 1
  logic [L1_W-1:0] s_a1, s_a2, s_d1, s_d2;
  assign s_a1 = sx1(pp[0]) + (sx1(pp[1]) << 2);
  assign s_a2 = sx1(pp[2]) + (sx1(pp[3]) << 2);

  logic unused_d1, unused_d2, unused_d3, unused_l1, unused_l2, unused_l3;
  dpdt_adder #(.W(L1_W), .LSP_W(L1_W/2)) u_d1 (
    .a(sx1(pp[4])), .b(sx1(pp[5]) << 2), .cin(1'b0),
    .sum(s_d1), .cout(unused_d1), .cout_lsp(unused_l1), .close(add_close[0])
  );
  dpdt_adder #(.W(L1_W), .LSP_W(L1_W/2)) u_d2 (
    .a(sx1(pp[6])), .b(sx1(pp[7]) << 2), .cin(1'b0),
    .sum(s_d2), .cout(unused_d2), .cout_lsp(unused_l2), .close(add_close[1])
  );

  // Level 2
  logic [L2_W-1:0] s_a3, s_d3;
  assign s_a3 = sx2(s_a1) + (sx2(s_a2) << 4);
  dpdt_adder #(.W(L2_W), .LSP_W(L2_W/2)) u_d3 (
    .a(sx2(s_d1)), .b(sx2(s_d2) << 4), .cin(1'b0),
    .sum(s_d3), .cout(unused_d3), .cout_lsp(unused_l3), .close(add_close[2])
  );

  // Level 3
  assign p = PW'($signed(s_a3)) + (PW'($signed(s_d3)) << 8);

  initial assert (BW == 16)
    else $error("dpdt_booth_mult: the tree is built for eight partial products (BW = 16)");

endmodule
