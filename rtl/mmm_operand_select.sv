// mmm_operand_select: 4:1 operand multiplexer of the Montgomery multiplier.
//
// From the multiplier bit a and quotient bit q it chooses the operand pair
// (P1, P2) that the next iteration adds, together with its precomputed XOR PX:
//   a=0 q=0 : 0,  0,  0
//   a=1 q=0 : B1, B2, BX
//   a=0 q=1 : 0,  n,  n
//   a=1 q=1 : D1, D2, DX
// Purely combinational.
module mmm_operand_select
  import mmm_pkg::*;
#(
  parameter int W = 1028
) (
  input  logic         a,
  input  logic         q,
  input  logic [W-1:0] b1,
  input  logic [W-1:0] b2,
  input  logic [W-1:0] bx,
  input  logic [W-1:0] n,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  input  logic [W-1:0] dx,
  output logic [W-1:0] p1,
  output logic [W-1:0] p2,
  output logic [W-1:0] px
);

  always_comb begin
    unique case (op_sel(q, a))
      OP_ZERO: begin p1 = '0; p2 = '0; px = '0; end
      OP_B:    begin p1 = b1; p2 = b2; px = bx; end
      OP_N:    begin p1 = '0; p2 = n;  px = n;  end
      OP_D:    begin p1 = d1; p2 = d2; px = dx; end
      default: begin p1 = '0; p2 = '0; px = '0; end
    endcase
  end

endmodule
