// mmm_core: Montgomery modular multiplier built on a partitioned 4:2
// compressor, with operands and result in carry-save form.
//
// Computes S1 + S2 == (A1 + A2) * (B1 + B2) * 2^-(K+3)  (mod n)
// for a K-bit odd modulus n. Preconditions (as for the iteration bounds):
// A1 + A2 < 2^(K+1), B1[0] = B2[0] = 0 and B1 + B2 < 4n. The result then
// satisfies S1 + S2 < 2n, so it can be fed straight back as a multiplier
// (A1,A2 = S1,S2) or, shifted up one place, as a multiplicand
// (B1,B2 = 2*S1, 2*S2). Seen that way the multiplier computes
// A * B' * 2^-(K+2) mod n with B = 2B', i.e. Montgomery multiplication with
// R = 2^(K+2) and no final subtraction.
//
// How it works. One clock is one iteration. The registers hold S1, S2, the
// operand pair P1, P2 chosen for this iteration, and the first compressor
// level of both pairs, SX = S1^S2 and PX = P1^P2, which the previous
// iteration already formed. Each clock csa42_step finishes the addition
// (S1+S2+P1+P2)/2, the new quotient q = S1_0 ^ S2_0 is taken from its result,
// and the multiplier bit A_{i+1} with q picks the next P1, P2, PX from
// {0, B, n, D=B+n}. In parallel the serial adder produces the next multiplier
// bit from A1, A2.
//
// Timing. start is sampled on a rising edge while idle (cycle 1, the inputs
// are captured). Cycle 2 is the pre-computation (BX, D1, D2, DX, A_0 and a
// cleared accumulator, i.e. iteration -1's inputs). Cycles 3 .. K+6 are the
// K+4 iterations i = -1 .. K+2. done is high for one cycle after the edge
// that ends cycle K+6: K+6 clock edges from the start edge to done. s1/s2
// keep the result until the next start; a new start is accepted in the same
// cycle as done. busy is high from the cycle after start until done.
//
// The iteration scheme, the operand table and the k+6 cycle count follow the
// algorithm this design implements. Widths (an internal K+4 bits so that no
// carry can leave the accumulator), the start/done handshake and the reset
// are this design's own choices. Reset is asynchronous and active low and
// clears only the control state.
module mmm_core
  import mmm_pkg::*;
#(
  parameter int K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K+2:0] a1,      // multiplier, carry-save word 1
  input  logic [K+2:0] a2,      // multiplier, carry-save word 2
  input  logic [K+1:0] b1,      // multiplicand, carry-save word 1, bit 0 = 0
  input  logic [K+1:0] b2,      // multiplicand, carry-save word 2, bit 0 = 0
  input  logic [K-1:0] n,       // odd modulus
  output logic         busy,
  output logic         done,
  output logic [K+2:0] s1,      // result, carry-save word 1
  output logic [K+2:0] s2       // result, carry-save word 2
);

  localparam int W     = K + 4;           // accumulator width
  localparam int ITERS = K + 4;           // iterations i = -1 .. K+2
  localparam int CW    = $clog2(ITERS + 1);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_ITER} state_e;

  state_e        state_q;
  logic [CW-1:0] iter_q;

  // operands held for the whole multiplication
  logic [W-1:0] b1_q, b2_q, n_q;
  logic [W-1:0] bx_q, d1_q, d2_q, dx_q;
  logic [W-1:0] bx_c, d1_c, d2_c, dx_c;

  // iteration registers
  logic [W-1:0] s1_q, s2_q, sx_q, p1_q, p2_q, px_q;
  logic [W-1:0] s1_c, s2_c, sx_c, p1_c, p2_c, px_c;
  logic         q_c;

  logic a_bit;
  logic load, step, last_iter;

  assign load      = (state_q == S_IDLE) && start;
  assign step      = (state_q == S_PRE) || (state_q == S_ITER);
  assign last_iter = (state_q == S_ITER) && (iter_q == CW'(ITERS - 1));

  mmm_abit_adder #(.AW(K + 3)) u_abit (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .step  (step),
    .a1_in (a1),
    .a2_in (a2),
    .a_bit (a_bit)
  );

  mmm_precompute #(.W(W)) u_pre (
    .b1 (b1_q), .b2 (b2_q), .n (n_q),
    .bx (bx_c), .d1 (d1_c), .d2 (d2_c), .dx (dx_c)
  );

  csa42_step #(.W(W)) u_step (
    .s1 (s1_q), .sx (sx_q),
    .p1 (p1_q), .p2 (p2_q), .px (px_q),
    .s1_next (s1_c), .s2_next (s2_c), .sx_next (sx_c), .q_next (q_c)
  );

  mmm_operand_select #(.W(W)) u_sel (
    .a  (a_bit), .q (q_c),
    .b1 (b1_q), .b2 (b2_q), .bx (bx_q), .n (n_q),
    .d1 (d1_q), .d2 (d2_q), .dx (dx_q),
    .p1 (p1_c), .p2 (p2_c), .px (px_c)
  );

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      iter_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) state_q <= S_PRE;
        S_PRE: begin
          state_q <= S_ITER;
          iter_q  <= '0;
        end
        S_ITER: begin
          iter_q <= iter_q + 1'b1;
          if (last_iter) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // datapath
  always_ff @(posedge clk) begin
    if (load) begin
      b1_q <= W'(b1);
      b2_q <= W'(b2);
      n_q  <= W'(n);
    end
    if (state_q == S_PRE) begin
      bx_q <= bx_c;
      d1_q <= d1_c;
      d2_q <= d2_c;
      dx_q <= dx_c;
      // inputs of iteration -1: S = 0 and P = 0
      s1_q <= '0;
      s2_q <= '0;
      sx_q <= '0;
      p1_q <= '0;
      p2_q <= '0;
      px_q <= '0;
    end else if (state_q == S_ITER) begin
      s1_q <= s1_c;
      s2_q <= s2_c;
      sx_q <= sx_c;
      p1_q <= p1_c;
      p2_q <= p2_c;
      px_q <= px_c;
    end
  end

  assign busy = (state_q != S_IDLE);
  assign s1   = s1_q[K+2:0];
  assign s2   = s2_q[K+2:0];

  // The halving drops bit 0 of the compressed sum; the quotient rule keeps it 0.
  a_sum_even: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_ITER) |-> ((s1_q[0] ^ s2_q[0] ^ p1_q[0] ^ p2_q[0]) == 1'b0));
  // With the preconditions met the accumulator never reaches the top bit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (s1_q[W-1] == 1'b0 && s2_q[W-1] == 1'b0));

endmodule
