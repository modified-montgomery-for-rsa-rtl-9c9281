// rsa_exp_msb: RSA modular exponentiation, MSB-first (left-to-right) binary
// method, on one Montgomery multiplier.
//
// result = msg^e mod n, for an odd K-bit modulus n, msg < n and an EBITS-bit
// exponent e. The caller supplies r2 = R^2 mod n with R = 2^(K+2), the
// Montgomery constant of mmm_core; it depends only on n.
//
// Sequence of Montgomery multiplications MMM(A, B') = A*B'/R mod n:
//   Mbar = MMM(msg, r2)                 message into the Montgomery domain
//   X    = MMM(r2, 1)                   Montgomery form of 1 (R mod n)
//   for j = EBITS-1 downto 0:
//     X = MMM(X, X)                     squaring, every exponent bit
//     if e[j]: X = MMM(X, Mbar)         multiplication, only for 1 bits
//   Y    = MMM(X, 1)                    back to the integer domain, Y <= n
//   result = Y mod n                    carry-propagate add, one subtraction
// X stays in carry-save form in the multiplier's own result registers: each
// multiplication takes its operands from there, so no separate accumulator
// is kept and the next multiplication starts in the cycle the previous one
// ends. For e = 65537 (17 bits) the loop is 17 squarings + 2 multiplications.
//
// Timing: start is sampled while idle and captures msg, e, n and r2; the
// first multiplication starts one cycle later. Every multiplication takes
// K+6 cycles; done is high for one cycle, one cycle after the last one ends.
// Total: 2 + (3 + EBITS + popcount(e)) * (K+6) cycles from the start edge.
// The MSB method and its squaring/multiplication count follow the RSA
// architecture this design implements; the domain conversions, the r2
// input, the final conversion and the handshake are this design's choices.
module rsa_exp_msb #(
  parameter int K     = 1024,
  parameter int EBITS = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [K-1:0]     msg,
  input  logic [EBITS-1:0] e,
  input  logic [K-1:0]     n,
  input  logic [K-1:0]     r2,
  output logic             busy,
  output logic             done,
  output logic [K-1:0]     result
);

  typedef enum logic [2:0] {
    X_IDLE, X_LAUNCH, X_TO_M, X_ONE, X_SQR, X_MUL, X_OUT
  } xop_e;

  localparam int JW = (EBITS > 1) ? $clog2(EBITS) : 1;

  xop_e            cur_q, nxt;
  logic [JW-1:0]   j_q, j_nxt;
  logic [K-1:0]    msg_q, n_q, r2_q;
  logic [EBITS-1:0] e_q;
  logic [K:0]      mb1_q, mb2_q;         // Mbar, carry-save (below 2n)

  logic            c_start, c_busy, c_done;
  logic [K+2:0]    c_a1, c_a2, c_s1, c_s2;
  logic [K+1:0]    c_b1, c_b2;
  logic [K-1:0]    red_r;

  mmm_core #(.K(K)) u_core (
    .clk (clk), .rst_n (rst_n), .start (c_start),
    .a1 (c_a1), .a2 (c_a2), .b1 (c_b1), .b2 (c_b2), .n (n_q),
    .busy (c_busy), .done (c_done), .s1 (c_s1), .s2 (c_s2)
  );

  cs_reduce #(.K(K)) u_red (
    .s1 (c_s1), .s2 (c_s2), .n (n_q), .r (red_r)
  );

  // next multiplication, decided when the current one ends
  always_comb begin
    nxt   = cur_q;
    j_nxt = j_q;
    c_start = 1'b0;
    unique case (cur_q)
      X_LAUNCH: begin nxt = X_TO_M; c_start = 1'b1; end
      X_TO_M: if (c_done) begin nxt = X_ONE; c_start = 1'b1; end
      X_ONE: if (c_done) begin
        nxt = X_SQR; j_nxt = JW'(EBITS - 1); c_start = 1'b1;
      end
      X_SQR: if (c_done) begin
        c_start = 1'b1;
        if (e_q[j_q])       nxt = X_MUL;
        else if (j_q == '0) nxt = X_OUT;
        else begin nxt = X_SQR; j_nxt = j_q - 1'b1; end
      end
      X_MUL: if (c_done) begin
        c_start = 1'b1;
        if (j_q == '0) nxt = X_OUT;
        else begin nxt = X_SQR; j_nxt = j_q - 1'b1; end
      end
      X_OUT: if (c_done) nxt = X_IDLE;
      default: ;
    endcase
  end

  // operands of the multiplication that starts now
  always_comb begin
    c_a1 = '0; c_a2 = '0; c_b1 = '0; c_b2 = '0;
    unique case (nxt)
      X_TO_M: begin c_a1 = (K+3)'(msg_q); c_b1 = {1'b0, r2_q, 1'b0}; end
      X_ONE:  begin c_a1 = (K+3)'(r2_q);  c_b1 = (K+2)'(2); end
      X_SQR:  begin
        c_a1 = c_s1; c_a2 = c_s2;
        c_b1 = {c_s1[K:0], 1'b0}; c_b2 = {c_s2[K:0], 1'b0};
      end
      X_MUL:  begin
        c_a1 = c_s1; c_a2 = c_s2;
        c_b1 = {mb1_q[K:0], 1'b0}; c_b2 = {mb2_q[K:0], 1'b0};
      end
      X_OUT:  begin c_a1 = c_s1; c_a2 = c_s2; c_b1 = (K+2)'(2); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= X_IDLE;
      j_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cur_q == X_IDLE) begin
        if (start) cur_q <= X_LAUNCH;
      end else begin
        cur_q <= nxt;
        j_q   <= j_nxt;
        if (cur_q == X_OUT && c_done) done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cur_q == X_IDLE && start) begin
      msg_q <= msg;
      e_q   <= e;
      n_q   <= n;
      r2_q  <= r2;
    end
    if (cur_q == X_TO_M && c_done) begin
      mb1_q <= c_s1[K:0];
      mb2_q <= c_s2[K:0];
    end
    if (cur_q == X_OUT && c_done) result <= red_r;
  end

  assign busy = (cur_q != X_IDLE);

  // A multiplication is only started when the multiplier is free.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    c_start |-> !c_busy);

endmodule
