// Signed XW x YW multiplier using radix-4 (modified) Booth encoding.
//
// The multiplier Y (YW bits, YW even) is recoded two bits at a time into
// YW/2 digits z_k = -2*y_{k+1} + y_k + y_{k-1} (k = 0, 2, .., YW-2, with
// y_{-1} = 0), each in {-2,-1,0,+1,+2}, so that Y = sum z_k*2^k and
// P = X*Y = sum (z_k*X)*2^k. Only YW/2 partial products are summed instead of
// YW, at the cost of a slightly more complex row generator (select 0, X or 2X,
// optionally one's-complemented).
//
// Structure:
//   booth_encoder  x YW/2  - recode a triplet, form z_k*X as pp + neg
//   booth_pp_adder         - sign-extend, shift row k/2 by k, add the u row,
//                            sum modulo 2^(XW+YW)
// The default 8x8 size, the one's-complement-plus-u negation and the plain
// sign extension follow the source design; making XW and YW parameters is this
// design's own generalisation.
//
// Interface: x, y and p are two's complement. The product is exact: p holds
// all XW+YW bits of X*Y for every input pair. Purely combinational; p settles
// one adder-array delay after x or y change. There is no clock or reset.
// The encoders' digit outputs are collected in `digit` for observation in
// simulation only; the product depends on the rows alone, so lint reports
// `digit` as unused.
module booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned XW = 8,             // multiplicand width
  parameter int unsigned YW = 8              // multiplier width, must be even
) (
  input  logic [XW-1:0]    x,                // multiplicand
  input  logic [YW-1:0]    y,                // multiplier
  output logic [XW+YW-1:0] p                 // product
);

  localparam int unsigned NPP = YW / 2;

  // Y with the implied y_{-1} = 0 appended below bit 0
  logic [YW:0]               y_ext;
  booth_digit_t [NPP-1:0]    digit;
  logic [NPP-1:0][XW:0]      pp;
  logic [NPP-1:0]            neg;

  assign y_ext = {y, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_enc
    booth_encoder #(.XW(XW)) u_enc (
      .x       (x),
      .triplet (y_ext[2*i +: 3]),
      .digit   (digit[i]),
      .pp      (pp[i]),
      .neg     (neg[i])
    );
  end

  booth_pp_adder #(.XW(XW), .YW(YW)) u_adder (
    .pp  (pp),
    .neg (neg),
    .p   (p)
  );

  // Booth recoding as written needs an even multiplier width.
  if (YW % 2 != 0) begin : g_bad_yw
    $error("booth_mult: YW must be even");
  end

endmodule
