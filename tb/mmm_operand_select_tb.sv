// mmm_operand_select_tb: checks all four rows of the operand table with
// random operand words: (a,q) = (0,0) -> 0, (1,0) -> B, (0,1) -> n,
// (1,1) -> D, each with its matching XOR word.
module mmm_operand_select_tb;

  localparam int W = 32;

  logic         a, q;
  logic [W-1:0] b1, b2, bx, n, d1, d2, dx, p1, p2, px;
  logic [W-1:0] e1, e2, ex;
  int checks = 0, failures = 0;

  mmm_operand_select #(.W(W)) dut (
    .a (a), .q (q), .b1 (b1), .b2 (b2), .bx (bx), .n (n),
    .d1 (d1), .d2 (d2), .dx (dx), .p1 (p1), .p2 (p2), .px (px)
  );

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      b1 = $urandom(); b2 = $urandom(); bx = $urandom(); n = $urandom();
      d1 = $urandom(); d2 = $urandom(); dx = $urandom();
      a = t[0]; q = t[1];
      #1;
      case ({q, a})
        2'b00: begin e1 = '0; e2 = '0; ex = '0; end
        2'b01: begin e1 = b1; e2 = b2; ex = bx; end
        2'b10: begin e1 = '0; e2 = n;  ex = n;  end
        default: begin e1 = d1; e2 = d2; ex = dx; end
      endcase
      checks++;
      if (p1 !== e1 || p2 !== e2 || px !== ex) begin
        failures++;
        $display("FAIL a=%b q=%b: %h %h %h", a, q, p1, p2, px);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
