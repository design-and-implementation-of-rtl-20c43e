// dpdt_adder: two's complement adder with data transition power diminution
// (DPDT).
//
// The W-bit adder is cut into a least significant part (LSP, bits
// LSP_W-1..0) and a most significant part (MSP, the bits above). A control
// circuit checks the effective range of both operands: when each operand's
// MSP bits are copies of its LSP sign bit, the whole sum is fixed by the
// LSP alone and the MSP is closed. While closed, the MSP operand latches hold
// their previous contents (the MSP adder sees no transition, so it neither
// switches nor glitches), the carry into the MSP is blocked, and the
// sign-extension unit drives the MSP bits of the sum with the sign of the
// LSP result, bit LSP_W of the exact sum: a[LSP_W-1] ^ b[LSP_W-1] ^ cout_lsp.
// While open, the latches are transparent and the MSP adds normally.
//
// The operand latches are intended: they are the mechanism of the technique,
// and they are level-sensitive on close, transparent while it is low.
//
// Interface: purely combinational (apart from the latches). sum and cout
// equal the W-bit sum a + b + cin and its carry in both modes; cout_lsp is
// the carry out of the LSP; close is high when the MSP is switched off.
//
// From the published design: the 16-bit size, the cut between bits 7 and 8,
// the MSP latches driven by Close, the gated carry into the MSP, the sign
// extension unit, the carry inputs and outputs (cin, cout, cout_lsp). Own
// choices: the exact range test, the carry-out formula used while closed,
// and the generalisation to other widths (the Booth multiplier uses 20- and
// 24-bit instances).
module dpdt_adder #(
  parameter int unsigned W     = 16,
  parameter int unsigned LSP_W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         cout_lsp,
  output logic         close
);

  localparam int unsigned MSP_W = W - LSP_W;

  // Effective range detection: bits LSP_W-1 .. W-1 all equal.
  logic a_fits, b_fits;
  assign a_fits = (&a[W-1:LSP_W-1]) | ~(|a[W-1:LSP_W-1]);
  assign b_fits = (&b[W-1:LSP_W-1]) | ~(|b[W-1:LSP_W-1]);
  assign close  = a_fits & b_fits;

  // LSP adder, always active.
  logic [LSP_W-1:0] sum_lsp;
  assign {cout_lsp, sum_lsp} = {1'b0, a[LSP_W-1:0]} + {1'b0, b[LSP_W-1:0]} + (LSP_W+1)'(cin);

  // MSP operand latches: transparent while the MSP is open.
  logic [MSP_W-1:0] a_msp_l, b_msp_l;
  always_latch begin
    if (!close) begin
      a_msp_l = a[W-1:LSP_W];
      b_msp_l = b[W-1:LSP_W];
    end
  end

  // MSP adder with the gated carry.
  logic             cin_msp;
  logic [MSP_W-1:0] sum_msp;
  logic             cout_msp;
  assign cin_msp = cout_lsp & ~close;
  assign {cout_msp, sum_msp} = {1'b0, a_msp_l} + {1'b0, b_msp_l} + (MSP_W+1)'(cin_msp);

  // Sign extension unit.
  logic sign_lsp, a_s, b_s;
  assign a_s      = a[LSP_W-1];
  assign b_s      = b[LSP_W-1];
  assign sign_lsp = a_s ^ b_s ^ cout_lsp;

  always_comb begin
    if (close) begin
      sum  = {{MSP_W{sign_lsp}}, sum_lsp};
      cout = (a_s & b_s) | ((a_s ^ b_s) & cout_lsp);
    end else begin
      sum  = {sum_msp, sum_lsp};
      cout = cout_msp;
    end
  end

endmodule
