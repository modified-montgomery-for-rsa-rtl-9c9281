// csa42_step_tb: random test of one partitioned 4:2 compressor iteration.
//
// Draws S1, S2, P1, P2 below 2^(W-2) with P1_0 ^ P2_0 = S1_0 ^ S2_0 (as the
// quotient rule guarantees), feeds SX = S1^S2 and PX = P1^P2, and checks
// that 2*(s1_next + s2_next) equals S1+S2+P1+P2, that sx_next and q_next are
// the XOR of the result words, all against plain integer arithmetic.
module csa42_step_tb;

  localparam int W = 40;

  logic [W-1:0] s1, s2, sx, p1, p2, px, s1n, s2n, sxn;
  logic         qn;
  int checks = 0, failures = 0;

  csa42_step #(.W(W)) dut (
    .s1 (s1), .sx (sx), .p1 (p1), .p2 (p2), .px (px),
    .s1_next (s1n), .s2_next (s2n), .sx_next (sxn), .q_next (qn)
  );

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()} & {2'b00, {(W-2){1'b1}}};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s1=%h s2=%h p1=%h p2=%h -> %h %h", what, s1, s2, p1, p2, s1n, s2n);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+1:0] want;
    for (int t = 0; t < 3000; t++) begin
      s1 = rnd(); s2 = rnd(); p1 = rnd(); p2 = rnd();
      if (t < 8) begin
        // corner cases: all zero / all ones within the allowed range
        s1 = (t & 1) ? {2'b00, {(W-2){1'b1}}} : '0;
        s2 = (t & 2) ? {2'b00, {(W-2){1'b1}}} : '0;
        p1 = (t & 4) ? {2'b00, {(W-2){1'b1}}} : '0;
        p2 = s2;
      end
      p2[0] = s1[0] ^ s2[0] ^ p1[0];
      sx = s1 ^ s2;
      px = p1 ^ p2;
      #1;
      want = (W+2)'(s1) + (W+2)'(s2) + (W+2)'(p1) + (W+2)'(p2);
      check({(W+2)'(s1n) + (W+2)'(s2n), 1'b0} == {1'b0, want}, "sum");
      check(sxn == (s1n ^ s2n), "sx_next");
      check(qn == (s1n[0] ^ s2n[0]), "q_next");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
