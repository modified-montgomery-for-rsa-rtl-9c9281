// cs_reduce: carry-save to binary conversion with one conditional
// subtraction of the modulus.
//
// r = (s1 + s2) mod n for s1 + s2 < 2n: the two words are added by a
// carry-propagate adder and n is subtracted once if the sum is not below n.
// Used after the last Montgomery multiplication of an exponentiation, whose
// result is at most n. Purely combinational; this conversion step is this
// design's own addition.
module cs_reduce #(
  parameter int K = 1024
) (
  input  logic [K+2:0] s1,
  input  logic [K+2:0] s2,
  input  logic [K-1:0] n,
  output logic [K-1:0] r
);

  logic [K+3:0] sum;
  logic [K-1:0] diff;

  always_comb begin
    sum        = {1'b0, s1} + {1'b0, s2};
    diff = sum[K-1:0] - n;             // low bits of sum - n
    r    = (sum >= (K+4)'(n)) ? diff : sum[K-1:0];
  end

endmodule
