// csa42_step: one iteration of the partitioned 4:2 compressor.
//
// Adds four W-bit operands S1+S2+P1+P2 and halves the sum, leaving the
// result in carry-save form (s1_next, s2_next). The first compressor level
// (SX = S1^S2 and PX = P1^P2) is not computed here: it was produced in the
// previous iteration and arrives from registers, which is the point of the
// scheme -- the critical path holds only the lower two levels plus the XOR
// that forms SX and the quotient for the next iteration.
//
//   SP      = SX ^ PX                      (bit j: parity of the four inputs)
//   MC      = SX ? P1 : S1                 (carry of S1+S2+P1, weight j+1)
//   sum_j   = SP_j ^ MC_{j-1}
//   carry_j = SP_j ? MC_{j-1} : P2_j       (weight j+1)
//   (S1+S2+P1+P2)/2 = carry + (sum >> 1)
//
// s1_next = carry and s2_next = sum >> 1. The bit dropped by the halving,
// sum_0, is zero whenever the operands were chosen by the quotient rule.
// Also produced for the next iteration: sx_next = s1_next ^ s2_next and the
// next quotient bit q_next = s1_next[0] ^ s2_next[0].
// The caller must keep S1+S2+P1+P2 below 2^W so that no carry leaves the top.
// S2 itself is not an input: it enters only the first-level XOR, whose
// result SX is supplied instead.
// The equations and the idea of computing the first level one iteration
// early follow the published algorithm; reading its "/2" as halving the
// pair's value (carry word unshifted, sum word shifted) is this design's.
// Purely combinational.
module csa42_step #(
  parameter int W = 1028
) (
  input  logic [W-1:0] s1,
  input  logic [W-1:0] sx,      // s1 ^ s2, precomputed
  input  logic [W-1:0] p1,
  input  logic [W-1:0] p2,
  input  logic [W-1:0] px,      // p1 ^ p2, precomputed
  output logic [W-1:0] s1_next,
  output logic [W-1:0] s2_next,
  output logic [W-1:0] sx_next,
  output logic         q_next
);

  logic [W-1:0] sp, mc, mc_in, sum;

  always_comb begin
    sp      = sx ^ px;
    mc      = (sx & p1) | (~sx & s1);
    mc_in   = {mc[W-2:0], 1'b0};          // carry arriving from bit j-1
    sum     = sp ^ mc_in;
    s1_next = (sp & mc_in) | (~sp & p2);
    s2_next = {1'b0, sum[W-1:1]};
    sx_next = s1_next ^ s2_next;
    q_next  = s1_next[0] ^ s2_next[0];
  end

endmodule
