// Partial-product alignment and summation for the radix-4 Booth multiplier.
//
// Row i (i = 0 .. YW/2-1) holds the (XW+1)-bit partial product of digit
// z_{2i}. It is sign-extended to the full product width XW+YW and shifted left
// by 2i bits, since z_{2i} has weight 2^(2i). One extra row collects the negate
// bits u_i of all encoders, u_i at bit 2i, which completes the two's complement
// of the negative rows. The YW/2+1 rows are then added modulo 2^(XW+YW); the
// result is the exact product X*Y. For the 8x8 case these are the rows a, b,
// c, d and the u0..u3 row of the original design, which also uses plain sign
// extension (no sign-extension-prevention constants) and a plain sum of the
// rows. The adder is written as a chain of additions and left to synthesis to
// map; a carry-save tree would be this design's own addition and is not made.
//
// Purely combinational; no clock.
module booth_pp_adder #(
  parameter int unsigned XW = 8,             // multiplicand width
  parameter int unsigned YW = 8,             // multiplier width, even
  localparam int unsigned NPP = YW / 2,      // number of Booth rows
  localparam int unsigned PW  = XW + YW      // product width
) (
  input  logic [NPP-1:0][XW:0] pp,           // partial products, row 0 first
  input  logic [NPP-1:0]       neg,          // negate bits u_i
  output logic [PW-1:0]        p             // sum of all rows
);

  logic [NPP:0][PW-1:0] rows;                // aligned rows; rows[NPP] is the u row

  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      // sign-extend to PW bits, then weight by 2^(2i)
      rows[i] = PW'(signed'(pp[i])) << (2 * i);
    end
    rows[NPP] = '0;
    for (int i = 0; i < NPP; i++) begin
      rows[NPP][2*i] = neg[i];
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i <= NPP; i++) begin
      p = p + rows[i];
    end
  end

endmodule
