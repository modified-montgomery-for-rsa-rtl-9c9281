// mmm_pkg: types shared by the Montgomery multiplier and the RSA exponentiators.
//
// op_sel_e encodes which operand pair the 4:2 compressor adds in one
// Montgomery iteration. The encoding is {quotient bit, multiplier bit}, so
// the four cases of the operand table map onto the four values directly:
//   A=0 q=0 -> nothing,   A=1 q=0 -> B,   A=0 q=1 -> n,   A=1 q=1 -> B+n (D).
// The table itself follows the multiplier algorithm; the bit encoding is a
// choice of this design.
package mmm_pkg;

  typedef enum logic [1:0] {
    OP_ZERO = 2'b00,  // q=0, A=0 : add 0
    OP_B    = 2'b01,  // q=0, A=1 : add B1,B2
    OP_N    = 2'b10,  // q=1, A=0 : add n
    OP_D    = 2'b11   // q=1, A=1 : add D1,D2 = B1+B2+n in carry-save form
  } op_sel_e;

  function automatic op_sel_e op_sel(input logic q, input logic a);
    return op_sel_e'({q, a});
  endfunction

endpackage
