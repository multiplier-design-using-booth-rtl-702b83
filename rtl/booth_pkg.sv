// Shared types and functions for the radix-4 (modified) Booth multiplier.
//
// A radix-4 Booth digit z_k is recoded from three adjacent multiplier bits
// (y_{k+1}, y_k, y_{k-1}) as z_k = -2*y_{k+1} + y_k + y_{k-1}, which takes one
// of the five values -2, -1, 0, +1, +2. The enum below names those five
// values; booth_recode() is the eight-entry recoding table. The encoding of
// the enum values is this design's own choice.
package booth_pkg;

  typedef enum logic [2:0] {
    BD_ZERO = 3'd0,   //  0
    BD_P1   = 3'd1,   // +1
    BD_P2   = 3'd2,   // +2
    BD_M2   = 3'd3,   // -2
    BD_M1   = 3'd4    // -1
  } booth_digit_t;

  // Recoding table: {y_{k+1}, y_k, y_{k-1}} -> z_k.
  function automatic booth_digit_t booth_recode(input logic [2:0] triplet);
    unique case (triplet)
      3'b000:  return BD_ZERO;
      3'b001:  return BD_P1;
      3'b010:  return BD_P1;
      3'b011:  return BD_P2;
      3'b100:  return BD_M2;
      3'b101:  return BD_M1;
      3'b110:  return BD_M1;
      default: return BD_ZERO;  // 3'b111
    endcase
  endfunction

  // Signed value of a digit, for checking and reporting.
  function automatic int booth_digit_value(input booth_digit_t d);
    unique case (d)
      BD_P1:   return 1;
      BD_P2:   return 2;
      BD_M2:   return -2;
      BD_M1:   return -1;
      default: return 0;
    endcase
  endfunction

endpackage
