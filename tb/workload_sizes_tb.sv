// workload_sizes_tb: the operand sizes the design is evaluated at.
//
// Montgomery multiplication at k = 512, 1024 and 2048 bits (three mmm_core
// instances, k+6 cycles each), and RSA encryption with e = 65537 at 512 bits
// on both engines of rsa_top (MSB: 19 loop multiplications, LSB: 17 loop
// slots), results against the reference model and latencies against the
// cycle formulas.
module workload_sizes_tb;
  import tb_ref_pkg::*;

  localparam int KR = 512;
  localparam int EB = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cyc = 0;

  logic fin512, fin1024, fin2048;
  int   c512, c1024, c2048, f512, f1024, f2048;

  mmm_size_run #(.K(512))  u_512  (.clk (clk), .rst_n (rst_n), .finished (fin512),
                                   .checks (c512),  .failures (f512));
  mmm_size_run #(.K(1024)) u_1024 (.clk (clk), .rst_n (rst_n), .finished (fin1024),
                                   .checks (c1024), .failures (f1024));
  mmm_size_run #(.K(2048)) u_2048 (.clk (clk), .rst_n (rst_n), .finished (fin2048),
                                   .checks (c2048), .failures (f2048));

  logic           h_start = 1'b0, l_start = 1'b0;
  logic [KR-1:0]  h_msg, h_n, h_r2, h_result, l_msg, l_n, l_r2, l_result;
  logic [EB-1:0]  h_e, l_e;
  logic           h_busy, h_done, l_busy, l_done;

  rsa_top #(.K(KR), .EBITS(EB)) u_rsa (
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
    big_t hn, hm, ln, lm, hr2, lr2;
    int c0, h_edges, l_edges;
    bit h_seen, l_seen;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    hn = rand_modulus(KR); hm = mod_n(rand_bits(KR), hn, KR); hr2 = r2_of(hn, KR);
    ln = rand_modulus(KR); lm = mod_n(rand_bits(KR), ln, KR); lr2 = r2_of(ln, KR);
    @(negedge clk);
    h_n = hn[KR-1:0]; h_msg = hm[KR-1:0]; h_r2 = hr2[KR-1:0]; h_e = EB'(65537);
    l_n = ln[KR-1:0]; l_msg = lm[KR-1:0]; l_r2 = lr2[KR-1:0]; l_e = EB'(65537);
    h_start = 1'b1; l_start = 1'b1;
    @(negedge clk);
    c0 = cyc;
    h_start = 1'b0; l_start = 1'b0;
    h_seen = 0; l_seen = 0; h_edges = 0; l_edges = 0;
    while (!(h_seen && l_seen && fin512 && fin1024 && fin2048)) begin
      if (h_done && !h_seen) begin h_seen = 1; h_edges = cyc - c0 + 1; end
      if (l_done && !l_seen) begin l_seen = 1; l_edges = cyc - c0 + 1; end
      @(negedge clk);
    end
    check(big_t'(h_result) == mod_pow(hm, 65537, hn, KR, EB), "RSA 512 MSB result");
    check(big_t'(l_result) == mod_pow(lm, 65537, ln, KR, EB), "RSA 512 LSB result");
    check(h_edges == 2 + (3 + 19) * (KR + 6), $sformatf("RSA 512 MSB latency %0d", h_edges));
    check(l_edges == 2 + (2 + 17) * (KR + 6), $sformatf("RSA 512 LSB latency %0d", l_edges));
    $display("RSA 512, e=65537: MSB %0d cycles (loop 19 x %0d), LSB %0d cycles (loop 17 x %0d)",
             h_edges, KR + 6, l_edges, KR + 6);
    checks   += c512 + c1024 + c2048;
    failures += f512 + f1024 + f2048;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
