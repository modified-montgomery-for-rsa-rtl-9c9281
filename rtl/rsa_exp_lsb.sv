// rsa_exp_lsb: RSA modular exponentiation, LSB-first (right-to-left) binary
// method, with squaring and multiplication on two Montgomery multipliers
// running in parallel.
//
// result = msg^e mod n, for an odd K-bit modulus n, msg < n and an EBITS-bit
// exponent e. The caller supplies r2 = R^2 mod n with R = 2^(K+2).
//
// One multiplier (the squarer) keeps Z, the other (the multiplier) keeps Y,
// each in carry-save form in its own result registers:
//   in parallel: Z = MMM(msg, r2), Y = MMM(r2, 1)     domain conversion
//   for j = 0 to EBITS-1, in parallel:
//     Z = MMM(Z, Z)                                    squaring, every bit
//     if e[j]: Y = MMM(Y, Z)   (Z before this squaring) multiplication
//   Y = MMM(Y, 1)                                      back to integers
//   result = Y mod n
// A step whose exponent bit is 0 leaves the multiplier idle and Y unchanged.
// For e = 65537 the loop takes 17 multiplication slots of K+6 cycles.
//
// Timing: start is sampled while idle and captures msg, e, n and r2; the
// first multiplications start one cycle later. done is high for one cycle,
// one cycle after the last multiplication. Total:
// 2 + (EBITS + 2) * (K+6) cycles from the start edge.
// The LSB method with parallel squaring and multiplication follows the RSA
// architecture this design implements; the conversions, the r2 input, the
// final conversion and the handshake are this design's choices.
module rsa_exp_lsb #(
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
    L_IDLE, L_LAUNCH, L_INIT, L_STEP, L_OUT
  } lop_e;

  localparam int JW = $clog2(EBITS + 1);

  lop_e             cur_q, nxt;
  logic [JW-1:0]    j_q, j_nxt;
  logic [K-1:0]     msg_q, n_q, r2_q;
  logic [EBITS-1:0] e_q;

  // squarer (Z) and multiplier (Y)
  logic          z_start, z_busy, z_done, y_start, y_busy, y_done;
  logic [K+2:0]  z_a1, z_a2, z_s1, z_s2, y_a1, y_a2, y_s1, y_s2;
  logic [K+1:0]  z_b1, z_b2, y_b1, y_b2;
  logic          slot_done;
  logic [K-1:0]  red_r;

  mmm_core #(.K(K)) u_sqr (
    .clk (clk), .rst_n (rst_n), .start (z_start),
    .a1 (z_a1), .a2 (z_a2), .b1 (z_b1), .b2 (z_b2), .n (n_q),
    .busy (z_busy), .done (z_done), .s1 (z_s1), .s2 (z_s2)
  );

  mmm_core #(.K(K)) u_mul (
    .clk (clk), .rst_n (rst_n), .start (y_start),
    .a1 (y_a1), .a2 (y_a2), .b1 (y_b1), .b2 (y_b2), .n (n_q),
    .busy (y_busy), .done (y_done), .s1 (y_s1), .s2 (y_s2)
  );

  cs_reduce #(.K(K)) u_red (
    .s1 (y_s1), .s2 (y_s2), .n (n_q), .r (red_r)
  );

  // The squarer runs in every slot but the last; the last runs only Y.
  assign slot_done = (cur_q == L_OUT) ? y_done : z_done;

  always_comb begin
    nxt   = cur_q;
    j_nxt = j_q;
    unique case (cur_q)
      L_LAUNCH: nxt = L_INIT;
      L_INIT: if (slot_done) begin nxt = L_STEP; j_nxt = '0; end
      L_STEP: if (slot_done) begin
        if (j_q == JW'(EBITS - 1)) nxt = L_OUT;
        else j_nxt = j_q + 1'b1;
      end
      L_OUT: if (slot_done) nxt = L_IDLE;
      default: ;
    endcase
  end

  // starts and operands of the slot that begins now
  always_comb begin
    z_start = 1'b0; y_start = 1'b0;
    z_a1 = '0; z_a2 = '0; z_b1 = '0; z_b2 = '0;
    y_a1 = '0; y_a2 = '0; y_b1 = '0; y_b2 = '0;
    if (cur_q == L_LAUNCH || (cur_q != L_IDLE && slot_done)) begin
      unique case (nxt)
        L_INIT: begin
          z_start = 1'b1;
          z_a1 = (K+3)'(msg_q); z_b1 = {1'b0, r2_q, 1'b0};
          y_start = 1'b1;
          y_a1 = (K+3)'(r2_q);  y_b1 = (K+2)'(2);
        end
        L_STEP: begin
          z_start = 1'b1;
          z_a1 = z_s1; z_a2 = z_s2;
          z_b1 = {z_s1[K:0], 1'b0}; z_b2 = {z_s2[K:0], 1'b0};
          y_start = e_q[j_nxt];
          y_a1 = y_s1; y_a2 = y_s2;
          y_b1 = {z_s1[K:0], 1'b0}; y_b2 = {z_s2[K:0], 1'b0};
        end
        L_OUT: begin
          y_start = 1'b1;
          y_a1 = y_s1; y_a2 = y_s2; y_b1 = (K+2)'(2);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= L_IDLE;
      j_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cur_q == L_IDLE) begin
        if (start) cur_q <= L_LAUNCH;
      end else begin
        cur_q <= nxt;
        j_q   <= j_nxt;
        if (cur_q == L_OUT && slot_done) done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cur_q == L_IDLE && start) begin
      msg_q <= msg;
      e_q   <= e;
      n_q   <= n;
      r2_q  <= r2;
    end
    if (cur_q == L_OUT && slot_done) result <= red_r;
  end

  assign busy = (cur_q != L_IDLE);

  // Both multipliers of a slot are started together and end together.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (cur_q == L_STEP && z_done) |-> (!y_busy));
  // Multiplications are only started on free multipliers.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (z_start |-> !z_busy) and (y_start |-> !y_busy));

endmodule
