// rsa_exp_msb_tb: self-checking test of the MSB-first exponentiator on one multiplier.
//
// For random odd K-bit moduli and random messages it computes msg^e mod n
// and compares with a square-and-multiply reference built on shift-and-add
// modular multiplication. Exponents: 65537, 3, 17, 1, 0, all ones and random
// 17-bit values. The total latency is checked against
// 2 + (3 + EBITS + popcount(e)) * (K+6) clock edges from the start edge to done.
module rsa_exp_msb_tb;
  import tb_ref_pkg::*;

  localparam int K  = 64;
  localparam int EB = 17;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0]  msg, n, r2, result;
  logic [EB-1:0] e;
  logic          busy, done;
  int checks = 0, failures = 0, cyc = 0;

  rsa_exp_msb #(.K(K), .EBITS(EB)) dut (
    .clk (clk), .rst_n (rst_n), .start (start),
    .msg (msg), .e (e), .n (n), .r2 (r2),
    .busy (busy), .done (done), .result (result)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t nn, m, want, r2_big;
    int c0, edges, expect_edges;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 24; t++) begin
      nn = rand_modulus(K);
      m  = mod_n(rand_bits(K), nn, K);
      case (t)
        0: e = EB'(65537);
        1: e = EB'(3);
        2: e = EB'(17);
        3: e = EB'(1);
        4: e = '0;
        5: e = '1;
        6: begin e = EB'(65537); m = '0; end
        7: begin e = EB'(65537); m = 1; end
        8: begin e = EB'(3); m = nn - 1; end
        default: e = EB'($urandom());
      endcase
      @(negedge clk);
      n = nn[K-1:0]; msg = m[K-1:0]; r2_big = r2_of(nn, K); r2 = r2_big[K-1:0];
      start = 1'b1;
      @(negedge clk);
      c0 = cyc;
      start = 1'b0;
      msg = '0; n = '0; r2 = '0;               // inputs are captured at start
      while (!done) @(negedge clk);
      edges = cyc - c0 + 1;
      expect_edges = 2 + (3 + EB + $countones(e)) * (K + 6);
      want = mod_pow(m, big_t'(e), nn, K, EB);
      checks++;
      if (big_t'(result) != want) begin
        failures++;
        $display("FAIL t=%0d e=%h: got %h want %h", t, e, result, want[K-1:0]);
      end
      checks++;
      if (edges != expect_edges) begin
        failures++;
        $display("FAIL t=%0d latency %0d, expected %0d", t, edges, expect_edges);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
