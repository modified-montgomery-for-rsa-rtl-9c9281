// rsa_top: RSA encryption engines built on the 4:2 compressor Montgomery
// multiplier, in the two binary exponentiation variants side by side.
//
// h_* ports: rsa_exp_msb, the MSB-first method on one multiplier
//            (for e = 65537: 19 multiplications in the loop).
// l_* ports: rsa_exp_lsb, the LSB-first method on two multipliers that
//            square and multiply in parallel (17 slots in the loop).
// Both compute msg^e mod n for an odd K-bit n, given r2 = 2^(2K+4) mod n,
// and are independent: each has its own start/done handshake (see the two
// modules for the cycle counts). Parameters: K modulus width, EBITS exponent
// width. The published design implements and reports both methods; putting
// them side by side in one top is this design's choice.
module rsa_top #(
  parameter int K     = 1024,
  parameter int EBITS = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  // MSB-first engine
  input  logic             h_start,
  input  logic [K-1:0]     h_msg,
  input  logic [EBITS-1:0] h_e,
  input  logic [K-1:0]     h_n,
  input  logic [K-1:0]     h_r2,
  output logic             h_busy,
  output logic             h_done,
  output logic [K-1:0]     h_result,
  // LSB-first engine
  input  logic             l_start,
  input  logic [K-1:0]     l_msg,
  input  logic [EBITS-1:0] l_e,
  input  logic [K-1:0]     l_n,
  input  logic [K-1:0]     l_r2,
  output logic             l_busy,
  output logic             l_done,
  output logic [K-1:0]     l_result
);

  rsa_exp_msb #(.K(K), .EBITS(EBITS)) u_msb (
    .clk (clk), .rst_n (rst_n), .start (h_start),
    .msg (h_msg), .e (h_e), .n (h_n), .r2 (h_r2),
    .busy (h_busy), .done (h_done), .result (h_result)
  );

  rsa_exp_lsb #(.K(K), .EBITS(EBITS)) u_lsb (
    .clk (clk), .rst_n (rst_n), .start (l_start),
    .msg (l_msg), .e (l_e), .n (l_n), .r2 (l_r2),
    .busy (l_busy), .done (l_done), .result (l_result)
  );

endmodule
