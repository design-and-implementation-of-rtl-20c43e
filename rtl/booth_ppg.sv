// booth_ppg: radix-4 Booth partial product generator with DPDT latches on
// the upper selection multiplexers.
//
// The generator forms the four multiples +A, -A, +2A, -2A of the signed
// multiplicand a, each PP_W = AW+1 bits wide. For every Booth digit i of the
// multiplier b (bits b[2i+1], b[2i], b[2i-1], with b[-1] = 0) a multiplexer
// picks 0, +-A or +-2A as partial product pp[i]; partial product i carries
// weight 4^i. The upper multiplexers do not take the multiples directly but
// through latches. When the upper bits of b are only sign extension, the upper
// Booth digits are all zero, those multiplexers select zero, and their latches
// close so the multiples bus changes do not reach them. close1 guards the
// top two digits (6 and 7 for a 16-bit b), close2 the two below them (4 and
// 5); close1 is high when b[BW-1:BW-5] are equal, close2 when
// b[BW-1:BW/2-1] are equal.
//
// The latches are intended: they are the mechanism of the technique.
//
// Interface: combinational. a = -2^(AW-1) times a digit of -2 does not fit
// the PP_W-bit partial product and is outside the supported range.
//
// From the published design: the 16-bit operands, the four multiples, eight
// digit multiplexers and 17-bit partial products, latches with two close
// signals on the upper multiplexers. Own choices: which multiplexers each
// close signal guards and the exact close conditions.
module booth_ppg #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 16,
  parameter int unsigned PP_W = AW + 1,
  parameter int unsigned NPP = BW / 2
) (
  input  logic [AW-1:0]   a,
  input  logic [BW-1:0]   b,
  output logic [PP_W-1:0] pp [NPP],
  output logic            close1,
  output logic            close2
);

  typedef enum logic [2:0] {
    SEL_ZERO, SEL_POS1, SEL_NEG1, SEL_POS2, SEL_NEG2
  } booth_sel_e;

  typedef struct packed {
    logic [PP_W-1:0] pos1;
    logic [PP_W-1:0] neg1;
    logic [PP_W-1:0] pos2;
    logic [PP_W-1:0] neg2;
  } multiples_t;

  // Partial product generator.
  multiples_t mult;
  always_comb begin
    mult.pos1 = PP_W'($signed(a));
    mult.neg1 = -mult.pos1;
    mult.pos2 = mult.pos1 << 1;
    mult.neg2 = -mult.pos2;
  end

  // Close signals: upper Booth digits are zero.
  logic [4:0]    top5;
  logic [BW/2:0] tophalf;
  assign top5    = b[BW-1:BW-5];
  assign tophalf = b[BW-1:BW/2-1];
  assign close1  = (&top5) | ~(|top5);
  assign close2  = (&tophalf) | ~(|tophalf);

  multiples_t mult_l1, mult_l2;
  always_latch begin
    if (!close1) mult_l1 = mult;
  end
  always_latch begin
    if (!close2) mult_l2 = mult;
  end

  // Booth digit encoding and selection.
  logic [BW:0] b_ext;
  assign b_ext = {b, 1'b0};

  function automatic booth_sel_e encode(input logic [2:0] trip);
    case (trip)
      3'b001, 3'b010: return SEL_POS1;
      3'b011:         return SEL_POS2;
      3'b100:         return SEL_NEG2;
      3'b101, 3'b110: return SEL_NEG1;
      default:        return SEL_ZERO;
    endcase
  endfunction

  function automatic logic [PP_W-1:0] select(input booth_sel_e sel, input multiples_t m);
    case (sel)
      SEL_POS1: return m.pos1;
      SEL_NEG1: return m.neg1;
      SEL_POS2: return m.pos2;
      SEL_NEG2: return m.neg2;
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < NPP; i++) begin
      if (i >= NPP - 2)      pp[i] = select(encode(b_ext[2*i +: 3]), mult_l1);
      else if (i >= NPP - 4) pp[i] = select(encode(b_ext[2*i +: 3]), mult_l2);
      else                   pp[i] = select(encode(b_ext[2*i +: 3]), mult);
    end
  end

endmodule
