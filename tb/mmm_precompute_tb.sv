// mmm_precompute_tb: random test of the operand pre-computation.
//
// Checks D1 + D2 == B1 + B2 + n, D1[0] == 0, BX == B1^B2 and DX == D1^D2
// against integer arithmetic, for random operands below 2^(W-2).
module mmm_precompute_tb;

  localparam int W = 36;

  logic [W-1:0] b1, b2, n, bx, d1, d2, dx;
  int checks = 0, failures = 0;

  mmm_precompute #(.W(W)) dut (
    .b1 (b1), .b2 (b2), .n (n), .bx (bx), .d1 (d1), .d2 (d2), .dx (dx)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: b1=%h b2=%h n=%h -> d1=%h d2=%h", what, b1, b2, n, d1, d2);
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
    for (int t = 0; t < 2000; t++) begin
      b1 = {$urandom(), $urandom()} & {2'b00, {(W-2){1'b1}}};
      b2 = {$urandom(), $urandom()} & {2'b00, {(W-2){1'b1}}};
      n  = {$urandom(), $urandom()} & {2'b00, {(W-2){1'b1}}};
      b1[0] = 1'b0; b2[0] = 1'b0; n[0] = 1'b1;
      #1;
      check((W+1)'(d1) + (W+1)'(d2) == (W+1)'(b1) + (W+1)'(b2) + (W+1)'(n), "d1+d2");
      check(d1[0] == 1'b0, "d1[0]");
      check(bx == (b1 ^ b2), "bx");
      check(dx == (d1 ^ d2), "dx");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
