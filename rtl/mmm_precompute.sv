// mmm_precompute: operand pre-computation for the Montgomery multiplier.
//
// Forms, once per multiplication, the values the iterations reuse:
//   BX = B1 ^ B2
//   D1, D2 = carry-save form of B1 + B2 + n, made by one full-adder level
//            whose carry is a multiplexer: carry = BX ? n : B1, D2 = BX ^ n
//   DX = D1 ^ D2
// The carry vector is shifted up one place into D1 so that D1 + D2 equals
// B1 + B2 + n exactly; D1[0] is therefore always 0. BX and DX are the
// first-level XORs of the two operand pairs that the iterations add.
// The three formulas follow the published pre-computation step; storing
// the carry shifted is this design's reading of its carry-save notation.
// Purely combinational; the multiplier registers the outputs.
module mmm_precompute #(
  parameter int W = 1028
) (
  input  logic [W-1:0] b1,
  input  logic [W-1:0] b2,
  input  logic [W-1:0] n,
  output logic [W-1:0] bx,
  output logic [W-1:0] d1,
  output logic [W-1:0] d2,
  output logic [W-1:0] dx
);

  logic [W-1:0] cy;

  always_comb begin
    bx = b1 ^ b2;
    cy = (bx & n) | (~bx & b1);
    d1 = {cy[W-2:0], 1'b0};
    d2 = bx ^ n;
    dx = d1 ^ d2;
  end

endmodule
