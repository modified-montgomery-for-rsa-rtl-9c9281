// mmm_abit_adder: bit-serial converter for the carry-save multiplier.
//
// The multiplier A arrives as two words A1, A2 with A = A1 + A2. The
// Montgomery iterations need one bit of A per iteration, least significant
// first, so a single full adder with a carry flip-flop adds the words one bit
// per clock: {carry, A_i} = A1_i + A2_i + carry.
//
// load  : capture A1, A2 and clear the carry.
// step  : add the lowest bits, shift both words down one place, register the
//         new bit in a_bit (valid from the next cycle).
// After the first step a_bit = A_0, after the second A_1, and so on. Bits
// beyond AW read as zero. The serial addition follows the published
// algorithm; the shift-register storage and the load/step control are this
// design's. Asynchronous active-low reset clears the carry and
// the bit; the words are written by load before they are used.
module mmm_abit_adder #(
  parameter int AW = 1027
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  logic [AW-1:0] a1_in,
  input  logic [AW-1:0] a2_in,
  output logic          a_bit
);

  logic [AW-1:0] a1_q, a2_q;
  logic          carry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      a_bit   <= 1'b0;
    end else if (load) begin
      carry_q <= 1'b0;
    end else if (step) begin
      {carry_q, a_bit} <= {1'b0, a1_q[0]} + {1'b0, a2_q[0]} + {1'b0, carry_q};
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      a1_q <= a1_in;
      a2_q <= a2_in;
    end else if (step) begin
      a1_q <= {1'b0, a1_q[AW-1:1]};
      a2_q <= {1'b0, a2_q[AW-1:1]};
    end
  end

endmodule
