// mmm_abit_adder_tb: loads random carry-save pairs A1, A2 and checks that
// successive steps deliver the bits of A1 + A2, least significant first,
// including the bits beyond the word width that come from the final carry.
module mmm_abit_adder_tb;

  localparam int AW = 45;

  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [AW-1:0] a1, a2;
  logic          a_bit;
  int checks = 0, failures = 0;

  mmm_abit_adder #(.AW(AW)) dut (
    .clk (clk), .rst_n (rst_n), .load (load), .step (step),
    .a1_in (a1), .a2_in (a2), .a_bit (a_bit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW+1:0] sum;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) begin
      a1 = {$urandom(), $urandom()};
      a2 = {$urandom(), $urandom()};
      if (t == 0) begin a1 = '1; a2 = '1; end
      sum = (AW+2)'(a1) + (AW+2)'(a2);
      @(negedge clk); load = 1'b1;
      @(negedge clk); load = 1'b0; step = 1'b1;
      for (int i = 0; i < AW + 2; i++) begin
        @(negedge clk);
        checks++;
        if (a_bit !== sum[i]) begin
          failures++;
          $display("FAIL t=%0d bit %0d: got %b want %b", t, i, a_bit, sum[i]);
        end
      end
      step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
