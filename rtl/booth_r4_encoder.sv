// booth_r4_encoder: radix-4 (modified) Booth partial-product generator.
//
// The 3-bit window arg = {y(i+1), y(i), y(i-1)} of the recoded operand selects one of the
// five multiples of the multiplicand x:
//   000, 111 -> 0     001, 010 -> +x     011 -> +2x     100 -> -2x     101, 110 -> -x
// x is sign-extended to N+2 bits, so that +-2x fits for every x, including x = -2^(N-1).
// It is doubled by a one-bit left shift and negated by inverting and adding one. The result
// is sign-extended to the 2N-bit product width. The weight 4^k of the window is applied by the
// caller (booth_r4_multiplier).
// The recoding table and the 2N-bit sign-extended output follow the architecture. Forming the
// multiple in N+2 bits, rather than N+1, is this design's choice; it keeps -2x correct for the
// most negative x. Combinational.
module booth_r4_encoder
  import booth_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   x,
  input  logic [2:0]     arg,
  output logic [2*N-1:0] pp
);

  localparam int unsigned WX = N + 2;

  booth_digit_e   digit;
  logic [WX-1:0]  x_ext;
  logic [WX-1:0]  mag;
  logic [WX-1:0]  mult;

  assign digit = booth_digit(arg);
  assign x_ext = {{2{x[N-1]}}, x};

  always_comb begin
    unique case (digit)
      DIGIT_POS2, DIGIT_NEG2: mag = x_ext << 1;
      DIGIT_POS1, DIGIT_NEG1: mag = x_ext;
      default:                mag = '0;
    endcase
    if (digit == DIGIT_NEG1 || digit == DIGIT_NEG2) mult = ~mag + WX'(1);
    else                                            mult = mag;
  end

  assign pp = {{(2*N-WX){mult[WX-1]}}, mult};

endmodule
