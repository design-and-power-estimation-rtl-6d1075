// booth_pkg: types and constants shared by the radix-4 Booth multiplier and its adders.
//
// adder_arch_e selects the carry-propagate adder used for each row of the partial-product
// reduction. Two adders are provided: a ripple carry adder (the default, the lower-power and
// smaller choice) and a two-level carry lookahead adder built from 8-bit blocks.
// booth_digit_e names the five radix-4 Booth digits {-2,-1,0,+1,+2}; booth_digit() maps a
// 3-bit window {y(i+1), y(i), y(i-1)} of the recoded operand to its digit.
package booth_pkg;

  typedef enum logic {
    ADDER_RCA = 1'b0,
    ADDER_CLA = 1'b1
  } adder_arch_e;

  typedef enum logic [2:0] {
    DIGIT_ZERO = 3'd0,
    DIGIT_POS1 = 3'd1,
    DIGIT_POS2 = 3'd2,
    DIGIT_NEG2 = 3'd3,
    DIGIT_NEG1 = 3'd4
  } booth_digit_e;

  // Width of the lookahead blocks of the carry lookahead adder.
  localparam int unsigned CLA_BLOCK_W = 8;

  // Radix-4 recoding: digit = -2*y(i+1) + y(i) + y(i-1).
  function automatic booth_digit_e booth_digit(input logic [2:0] win);
    unique case (win)
      3'b000, 3'b111: return DIGIT_ZERO;
      3'b001, 3'b010: return DIGIT_POS1;
      3'b011:         return DIGIT_POS2;
      3'b100:         return DIGIT_NEG2;
      default:        return DIGIT_NEG1;  // 3'b101, 3'b110
    endcase
  endfunction

endpackage
