// rsa_top_full_tb: one complete RSA encryption on each engine of rsa_top at
// its default size (1024-bit modulus, 17-bit exponent), with e = 65537.
//
// Both engines get their own random 1024-bit odd modulus and message and run
// at the same time. The results are compared with a square-and-multiply
// reference and the latencies with the engines' cycle formulas:
// MSB 2 + (3 + 17 + 2) * 1030 and LSB 2 + (17 + 2) * 1030 clock edges.
module rsa_top_full_tb;
  import tb_ref_pkg::*;

  localparam int K  = 1024;
  localparam int EB = 17;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          h_start = 1'b0, l_start = 1'b0;
  logic [K-1:0]  h_msg, h_n, h_r2, h_result, l_msg, l_n, l_r2, l_result;
  logic [EB-1:0] h_e, l_e;
  logic          h_busy, h_done, l_busy, l_done;
  int checks = 0, failures = 0, cyc = 0;

  rsa_top dut (
    .clk (clk), .rst_n (rst_n),
    .h_start (h_start), .h_msg (h_msg), .h_e (h_e), .h_n (h_n), .h_r2 (h_r2),
    .h_busy (h_busy), .h_done (h_done), .h_result (h_result),
    .l_start (l_start), .l_msg (l_msg), .l_e (l_e), .l_n (l_n), .l_r2 (l_r2),
    .l_busy (l_busy), .l_done (l_done), .l_result (l_result)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    big_t hn, hm, ln, lm, hr2, lr2, hwant, lwant;
    int c0, h_edges, l_edges;
    bit h_seen, l_seen;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    hn = rand_modulus(K); hm = mod_n(rand_bits(K), hn, K); hr2 = r2_of(hn, K);
    ln = rand_modulus(K); lm = mod_n(rand_bits(K), ln, K); lr2 = r2_of(ln, K);
    @(negedge clk);
    h_n = hn[K-1:0]; h_msg = hm[K-1:0]; h_r2 = hr2[K-1:0]; h_e = EB'(65537);
    l_n = ln[K-1:0]; l_msg = lm[K-1:0]; l_r2 = lr2[K-1:0]; l_e = EB'(65537);
    h_start = 1'b1; l_start = 1'b1;
    @(negedge clk);
    c0 = cyc;
    h_start = 1'b0; l_start = 1'b0;
    h_seen = 0; l_seen = 0; h_edges = 0; l_edges = 0;
    while (!(h_seen && l_seen)) begin
      if (h_done && !h_seen) begin h_seen = 1; h_edges = cyc - c0 + 1; end
      if (l_done && !l_seen) begin l_seen = 1; l_edges = cyc - c0 + 1; end
      @(negedge clk);
    end
    hwant = mod_pow(hm, big_t'(h_e), hn, K, EB);
    lwant = mod_pow(lm, big_t'(l_e), ln, K, EB);
    check(big_t'(h_result) == hwant, "MSB result");
    check(big_t'(l_result) == lwant, "LSB result");
    check(h_edges == 2 + (3 + EB + 2) * (K + 6), $sformatf("MSB latency %0d", h_edges));
    check(l_edges == 2 + (EB + 2) * (K + 6), $sformatf("LSB latency %0d", l_edges));
    $display("MSB engine %0d cycles, LSB engine %0d cycles", h_edges, l_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
