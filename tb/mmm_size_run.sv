// mmm_size_run: testbench helper that exercises one mmm_core of width K.
//
// After reset it performs ROUNDS Montgomery multiplications with random odd
// K-bit moduli and random carry-save operands below 2n, checks each result
// against the bit-serial reference and each latency against K+6 clock
// edges, then raises finished with its check and failure counts.
module mmm_size_run
  import tb_ref_pkg::*;
#(
  parameter int K      = 512,
  parameter int ROUNDS = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic         start = 1'b0;
  logic [K+2:0] a1, a2, s1, s2;
  logic [K+1:0] b1, b2;
  logic [K-1:0] n;
  logic         busy, done;
  int           cyc = 0;

  mmm_core #(.K(K)) dut (
    .clk (clk), .rst_n (rst_n), .start (start),
    .a1 (a1), .a2 (a2), .b1 (b1), .b2 (b2), .n (n),
    .busy (busy), .done (done), .s1 (s1), .s2 (s2)
  );

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    big_t nn, a, b, w1, w2, x1, x2, got, want;
    int c0, edges;
    finished = 1'b0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int t = 0; t < ROUNDS; t++) begin
      nn = rand_modulus(K);
      a  = mod_n(rand_bits(K + 1), nn << 1, K + 1);
      b  = mod_n(rand_bits(K + 1), nn << 1, K + 1);
      w1 = a & rand_bits(K + 1); w2 = a - w1;
      x1 = b & rand_bits(K + 1); x2 = b - x1;
      @(negedge clk);
      n = nn[K-1:0];
      a1 = w1[K+2:0]; a2 = w2[K+2:0];
      b1 = {x1[K:0], 1'b0}; b2 = {x2[K:0], 1'b0};
      start = 1'b1;
      @(negedge clk);
      c0 = cyc;
      start = 1'b0;
      while (!done) @(negedge clk);
      edges = cyc - c0 + 1;
      got  = big_t'(s1) + big_t'(s2);
      want = mont_ref(a, b, nn, K);
      checks += 2;
      if (got >= (nn << 1) || mod_n(got, nn, K) != want) begin
        failures++;
        $display("FAIL K=%0d round %0d: wrong product", K, t);
      end
      if (edges != K + 6) begin
        failures++;
        $display("FAIL K=%0d round %0d: %0d cycles, expected %0d", K, t, edges, K + 6);
      end
    end
    $display("K=%0d: %0d multiplications of %0d cycles checked", K, ROUNDS, K + 6);
    finished = 1'b1;
  end

endmodule
