// Radix-4 Booth encoder and partial-product generator for one row.
//
// Takes one multiplier triplet {y_{k+1}, y_k, y_{k-1}} and the XW-bit signed
// multiplicand X, and forms the row's partial product z_k*X, where
// z_k = -2*y_{k+1} + y_k + y_{k-1} is in {-2,-1,0,+1,+2}.
//
// The product is returned in two pieces so that no carry-propagating negation
// is needed here:
//   +X : pp = X sign-extended to XW+1 bits,            neg = 0
//   +2X: pp = X shifted left one place,                neg = 0
//   -X : pp = one's complement of sign-extended X,     neg = 1
//   -2X: pp = one's complement of X shifted left,      neg = 1
//    0 : pp = 0,                                       neg = 0
// so that z_k*X = signed(pp) + neg. The "+1" of the two's complement is added
// later, at the row's least significant position, by the adder array.
// This construction (one's complement plus a separate LSB bit, shift for x2,
// XW+1-bit rows) follows the source design; for X = -2^(XW-1) and z_k = -2 the
// (XW+1)-bit pp is 2^XW - 1, which with neg gives the correct 2^XW.
//
// Purely combinational; no clock.
module booth_encoder
  import booth_pkg::*;
#(
  parameter int unsigned XW = 8              // multiplicand width
) (
  input  logic [XW-1:0] x,                   // multiplicand, two's complement
  input  logic [2:0]    triplet,             // {y_{k+1}, y_k, y_{k-1}}
  output booth_digit_t  digit,               // recoded digit z_k
  output logic [XW:0]   pp,                  // partial product (one's complement if neg)
  output logic          neg                  // u bit: add 1 at the row LSB
);

  always_comb begin
    digit = booth_recode(triplet);
    unique case (digit)
      BD_P1:   begin pp =  {x[XW-1], x};  neg = 1'b0; end
      BD_P2:   begin pp =  {x, 1'b0};     neg = 1'b0; end
      BD_M1:   begin pp = ~{x[XW-1], x};  neg = 1'b1; end
      BD_M2:   begin pp = ~{x, 1'b0};     neg = 1'b1; end
      default: begin pp = '0;             neg = 1'b0; end
    endcase
  end

endmodule
