// mmm_core_tb: self-checking test of the Montgomery multiplier.
//
// For random odd K-bit moduli it multiplies random operands A < 2n and
// B' < 2n, each split at random into two carry-save words, with B = 2B' on
// the multiplicand port, and checks
//   (S1 + S2) mod n == A * B' * 2^-(K+2) mod n,   S1 + S2 < 2n
// against a bit-serial reference, and that done comes K+6 clock edges after
// the edge that samples start. A second phase chains multiplications the
// way an exponentiation does: the result words go straight back in as
// multiplier and (shifted) multiplicand, each start issued in the cycle of
// the previous done. Corner operands 0 and 2n-1 are included. A third phase
// runs a K=4 instance exhaustively: every 4-bit odd modulus with its top bit
// set, every A < 2n and B' < 2n, with a random carry-save split of each.
module mmm_core_tb;
  import tb_ref_pkg::*;

  localparam int K = 64;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K+2:0] a1, a2, s1, s2;
  logic [K+1:0] b1, b2;
  logic [K-1:0] n;
  logic         busy, done;
  int checks = 0, failures = 0, cyc = 0;

  mmm_core #(.K(K)) dut (
    .clk (clk), .rst_n (rst_n), .start (start),
    .a1 (a1), .a2 (a2), .b1 (b1), .b2 (b2), .n (n),
    .busy (busy), .done (done), .s1 (s1), .s2 (s2)
  );

  // small instance for the exhaustive phase
  localparam int KS = 4;
  logic          st4 = 1'b0, busy4, done4;
  logic [KS+2:0] a14, a24, s14, s24;
  logic [KS+1:0] b14, b24;
  logic [KS-1:0] n4;

  mmm_core #(.K(KS)) dut4 (
    .clk (clk), .rst_n (rst_n), .start (st4),
    .a1 (a14), .a2 (a24), .b1 (b14), .b2 (b24), .n (n4),
    .busy (busy4), .done (done4), .s1 (s14), .s2 (s24)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  // split v into two words whose sum is v
  task automatic split(input big_t v, input int bits, output big_t w1, output big_t w2);
    w1 = v & rand_bits(bits);
    w2 = v - w1;
  endtask

  // drive operands, pulse start, wait for done, return cycle count
  task automatic run(input big_t av1, input big_t av2, input big_t bv1, input big_t bv2,
                     output int edges);
    int c0;
    @(negedge clk);
    a1 = av1[K+2:0]; a2 = av2[K+2:0];
    b1 = {bv1[K:0], 1'b0}; b2 = {bv2[K:0], 1'b0};
    start = 1'b1;
    @(negedge clk);
    c0 = cyc;                       // edges counted so far, start edge included
    start = 1'b0;
    while (!done) @(negedge clk);
    edges = cyc - c0 + 1;
  endtask

  task automatic verify(input big_t a, input big_t b, input big_t nn, input string tag);
    big_t got, want;
    got  = big_t'(s1) + big_t'(s2);
    want = mont_ref(a, b, nn, K);
    check(got < (nn << 1), {tag, " range"});
    check(mod_n(got, nn, K) == want, {tag, " value"});
    if (mod_n(got, nn, K) != want)
      $display("  a=%h b=%h n=%h got=%h want=%h", a, b, nn, got, want);
  endtask

  initial begin
    big_t nn, a, b, w1, w2, x1, x2, y1, y2;
    int edges;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // phase 1: independent multiplications
    for (int t = 0; t < 60; t++) begin
      nn = rand_modulus(K);
      n  = nn[K-1:0];
      a  = mod_n(rand_bits(K + 1), nn << 1, K + 1);
      b  = mod_n(rand_bits(K + 1), nn << 1, K + 1);
      if (t == 0) a = '0;
      if (t == 1) begin a = (nn << 1) - 1; b = (nn << 1) - 1; end
      if (t == 2) begin a = 1; b = 1; end
      split(a, K + 1, w1, w2);
      split(b, K + 1, x1, x2);
      run(w1, w2, x1, x2, edges);
      check(edges == K + 6, "cycle count");
      if (edges != K + 6) $display("  took %0d edges, expected %0d", edges, K + 6);
      verify(a, b, nn, "single");
      check(!busy, "busy low at done");
    end

    // phase 2: chained squarings/multiplications started back to back
    for (int t = 0; t < 4; t++) begin
      int c_first;
      nn = rand_modulus(K);
      n  = nn[K-1:0];
      b  = mod_n(rand_bits(K), nn, K);           // fixed multiplicand
      split(b, K + 1, y1, y2);
      a  = mod_n(rand_bits(K), nn, K);
      split(a, K + 1, w1, w2);
      run(w1, w2, y1, y2, edges);
      verify(a, b, nn, "chain start");
      c_first = cyc;
      for (int r = 0; r < 12; r++) begin
        big_t prev;
        prev = big_t'(s1) + big_t'(s2);
        // issue the next start in the cycle done is high
        a1 = s1; a2 = s2;
        if (r[0]) begin
          b1 = {s1[K:0], 1'b0}; b2 = {s2[K:0], 1'b0};
        end else begin
          b1 = {y1[K:0], 1'b0}; b2 = {y2[K:0], 1'b0};
        end
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        verify(prev, r[0] ? prev : b, nn, "chain");
      end
      check(cyc - c_first == 12 * (K + 6), "back-to-back cycle count");
    end

    // phase 3: exhaustive at K=4
    for (int nv = 9; nv < 16; nv += 2) begin
      for (int av = 0; av < 2 * nv; av++) begin
        for (int bv = 0; bv < 2 * nv; bv++) begin
          int aa1, bb1, got4, want4;
          aa1 = (av == 0) ? 0 : $urandom_range(av);
          bb1 = (bv == 0) ? 0 : $urandom_range(bv);
          @(negedge clk);
          n4  = KS'(nv);
          a14 = (KS+3)'(aa1); a24 = (KS+3)'(av - aa1);
          b14 = (KS+2)'(2 * bb1); b24 = (KS+2)'(2 * (bv - bb1));
          st4 = 1'b1;
          @(negedge clk);
          st4 = 1'b0;
          while (!done4) @(negedge clk);
          got4  = int'(s14) + int'(s24);
          want4 = int'(mont_ref(big_t'(av), big_t'(bv), big_t'(nv), KS));
          checks++;
          if (got4 >= 2 * nv || (got4 % nv) != want4) begin
            failures++;
            $display("FAIL K=4 n=%0d a=%0d b=%0d: got %0d want %0d", nv, av, bv, got4, want4);
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
