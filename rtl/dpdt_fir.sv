// dpdt_fir: TAPS-tap direct-form FIR filter built from DPDT Booth multipliers
// and DPDT adders.
//
// The signed XW-bit input runs down a delay line of TAPS-1 unit delays
// (registers loaded once per sample, one sample per clock). Tap k multiplies
// x(n-k), sign-extended to 16 bits as the Booth-encoded operand, by the 16-bit
// signed coefficient h[k] in a dpdt_booth_mult. A chain of TAPS-1 DPDT adders
// (dpdt_adder, YW bits, cut in the middle) sums the products from tap 0
// upward, and the sum is registered as y. With a narrow input the upper
// Booth digits of every multiplier are zero, so their upper latches and
// upper adders stay closed; small partial sums close the chain adders too.
//
// Interface: x and h[] sampled at the rising edge of clk; after that edge
// y = sum_k h[k] * x(n-k) (mod 2^YW) for the sample x(n) just taken, so y
// lags the sample by one register. rst is synchronous, active high, and
// clears the delay line and y. mult_ppg_close, mult_add_close and
// add_close expose the close flags of every multiplier and chain adder. With
// the default 8-bit sample the Booth latch flags (mult_ppg_close) are
// constant 1 by construction, and synthesis sees them as constant outputs;
// they are kept so that a wider XW can be observed the same way.
//
// From the published design: the direct form with DPDT multipliers and DPDT
// adders, 8 taps, 8-bit input, 16-bit coefficients h0..h7 as inputs, 32-bit
// output, clock and reset. Own choices: the registered output, the
// synchronous reset, the adder cut at half width.
module dpdt_fir #(
  parameter int unsigned TAPS = lpfir_pkg::DP_TAPS,
  parameter int unsigned XW   = lpfir_pkg::DP_XW,
  parameter int unsigned HW   = lpfir_pkg::DP_HW,
  parameter int unsigned YW   = lpfir_pkg::DP_YW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] x,
  input  logic [HW-1:0] h             [TAPS],
  output logic [YW-1:0] y,
  output logic [1:0]    mult_ppg_close[TAPS],
  output logic [2:0]    mult_add_close[TAPS],
  output logic [TAPS-2:0] add_close
);

  localparam int unsigned BW = 16;   // Booth operand width of the multiplier

  logic [XW-1:0]    xd   [TAPS];     // xd[k] = x(n-k)
  logic [HW+BW-1:0] prod [TAPS];
  logic [YW-1:0]    part [TAPS];     // running sums along the adder chain

  assign xd[0] = x;
  always_ff @(posedge clk) begin
    if (rst) for (int unsigned k = 1; k < TAPS; k++) xd[k] <= '0;
    else     for (int unsigned k = 1; k < TAPS; k++) xd[k] <= xd[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    dpdt_booth_mult #(.AW(HW), .BW(BW)) u_dm (
      .a        (h[k]),
      .b        (BW'($signed(xd[k]))),
      .p        (prod[k]),
      .ppg_close(mult_ppg_close[k]),
      .add_close(mult_add_close[k])
    );
  end

  assign part[0] = YW'($signed(prod[0]));
  for (genvar k = 1; k < TAPS; k++) begin : g_da
    logic unused_cout, unused_cout_lsp;
    dpdt_adder #(.W(YW), .LSP_W(YW/2)) u_da (
      .a       (part[k-1]),
      .b       (YW'($signed(prod[k]))),
      .cin     (1'b0),
      .sum     (part[k]),
      .cout    (unused_cout),
      .cout_lsp(unused_cout_lsp),
      .close   (add_close[k-1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= part[TAPS-1];
  end

  initial assert (XW <= BW)
    else $error("dpdt_fir: the input must fit the 16-bit Booth operand");

endmodule
