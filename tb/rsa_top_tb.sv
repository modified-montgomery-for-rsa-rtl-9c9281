// rsa_top_tb: end-to-end test of both RSA engines of rsa_top, run at the
// same time on different operands, at a reduced modulus width.
//
// Each round gives the MSB-first and the LSB-first engine their own random
// modulus, message and exponent (65537 first, then 3 and random ones),
// checks both results against a square-and-multiply reference and both
// latencies against the cycle formulas of the two engines. Alongside it
// counts how often each mechanism of the design occurred and fails if one
// never did: the four operand cases of the Montgomery iteration (add 0, B, n,
// B+n), a carry in the bit-serial multiplier adder, squarings and
// multiplications of the MSB engine (and that e = 65537 takes 17 + 2), and
// slots of the LSB engine with squaring and multiplication in parallel and
// with the squarer alone.
module rsa_top_tb;
  import tb_ref_pkg::*;

  localparam int K      = 128;
  localparam int EB     = 17;
  localparam int ROUNDS = 6;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          h_start = 1'b0, l_start = 1'b0;
  logic [K-1:0]  h_msg, h_n, h_r2, h_result, l_msg, l_n, l_r2, l_result;
  logic [EB-1:0] h_e, l_e;
  logic          h_busy, h_done, l_busy, l_done;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int sel_cnt [4];
  int carry_cnt = 0, h_sqr = 0, h_mul = 0, l_par = 0, l_sqr_only = 0;

  rsa_top #(.K(K), .EBITS(EB)) dut (
    .clk (clk), .rst_n (rst_n),
    .h_start (h_start), .h_msg (h_msg), .h_e (h_e), .h_n (h_n), .h_r2 (h_r2),
    .h_busy (h_busy), .h_done (h_done), .h_result (h_result),
    .l_start (l_start), .l_msg (l_msg), .l_e (l_e), .l_n (l_n), .l_r2 (l_r2),
    .l_busy (l_busy), .l_done (l_done), .l_result (l_result)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // observe the mechanisms inside the engines
  always @(posedge clk) if (rst_n) begin
    if (dut.u_msb.u_core.state_q == 2'd2)                  // iterating
      sel_cnt[{dut.u_msb.u_core.u_sel.q, dut.u_msb.u_core.u_sel.a}]++;
    if (dut.u_lsb.u_mul.state_q == 2'd2)
      sel_cnt[{dut.u_lsb.u_mul.u_sel.q, dut.u_lsb.u_mul.u_sel.a}]++;
    if (dut.u_msb.u_core.u_abit.carry_q) carry_cnt++;
    if (dut.u_msb.c_start && dut.u_msb.nxt == 3'd4) h_sqr++;   // squaring
    if (dut.u_msb.c_start && dut.u_msb.nxt == 3'd5) h_mul++;   // multiplication
    if (dut.u_lsb.z_start && dut.u_lsb.nxt == 3'd3) begin      // loop slot
      if (dut.u_lsb.y_start) l_par++;
      else                   l_sqr_only++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
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
    int c0, h_edges, l_edges, h_sqr0, h_mul0;
    bit h_seen, l_seen;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < ROUNDS; t++) begin
      hn = rand_modulus(K); hm = mod_n(rand_bits(K), hn, K); hr2 = r2_of(hn, K);
      ln = rand_modulus(K); lm = mod_n(rand_bits(K), ln, K); lr2 = r2_of(ln, K);
      @(negedge clk);
      h_n = hn[K-1:0]; h_msg = hm[K-1:0]; h_r2 = hr2[K-1:0];
      l_n = ln[K-1:0]; l_msg = lm[K-1:0]; l_r2 = lr2[K-1:0];
      h_e = (t == 0) ? EB'(65537) : (t == 1) ? EB'(3) : EB'($urandom());
      l_e = (t == 0) ? EB'(65537) : (t == 1) ? EB'(3) : EB'($urandom());
      h_sqr0 = h_sqr; h_mul0 = h_mul;
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
      check(big_t'(h_result) == hwant, $sformatf("round %0d MSB result", t));
      check(big_t'(l_result) == lwant, $sformatf("round %0d LSB result", t));
      check(h_edges == 2 + (3 + EB + $countones(h_e)) * (K + 6),
            $sformatf("round %0d MSB latency %0d", t, h_edges));
      check(l_edges == 2 + (EB + 2) * (K + 6),
            $sformatf("round %0d LSB latency %0d", t, l_edges));
      if (t == 0) begin
        check(h_sqr - h_sqr0 == 17, "e=65537: 17 squarings");
        check(h_mul - h_mul0 == 2,  "e=65537: 2 multiplications");
        $display("e=65537: MSB loop %0d multiplications, %0d cycles each",
                 (h_sqr - h_sqr0) + (h_mul - h_mul0), K + 6);
      end
    end
    $display("operand cases: zero=%0d B=%0d n=%0d D=%0d", sel_cnt[0], sel_cnt[1],
             sel_cnt[2], sel_cnt[3]);
    $display("serial-adder carries=%0d  MSB squarings=%0d multiplications=%0d",
             carry_cnt, h_sqr, h_mul);
    $display("LSB slots parallel=%0d squaring-only=%0d", l_par, l_sqr_only);
    check(sel_cnt[0] > 0, "operand case 0 occurred");
    check(sel_cnt[1] > 0, "operand case B occurred");
    check(sel_cnt[2] > 0, "operand case n occurred");
    check(sel_cnt[3] > 0, "operand case B+n occurred");
    check(carry_cnt > 0,  "serial adder carry occurred");
    check(h_sqr > 0 && h_mul > 0, "MSB squaring and multiplication occurred");
    check(l_par > 0,      "LSB parallel slot occurred");
    check(l_sqr_only > 0, "LSB squaring-only slot occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
