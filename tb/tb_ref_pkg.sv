// tb_ref_pkg: big-integer reference arithmetic for the testbenches.
//
// All values are unsigned integers in a fixed 2112-bit vector, enough for
// moduli up to 2048 bits plus guard bits. The functions work bit by bit
// (shift-and-add multiplication, halving for the inverse of 2) and share no
// code with the design under test.
package tb_ref_pkg;

  localparam int MAXW = 2112;
  typedef logic [MAXW-1:0] big_t;

  // random value below 2^bits
  function automatic big_t rand_bits(input int bits);
    big_t v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom();
    for (int i = bits; i < MAXW; i++) v[i] = 1'b0;
    return v;
  endfunction

  // random odd modulus of exactly k bits
  function automatic big_t rand_modulus(input int k);
    big_t v = rand_bits(k);
    v[k-1] = 1'b1;
    v[0]   = 1'b1;
    return v;
  endfunction

  // a mod n by repeated subtraction of shifted n (a < 2^MAXW-1)
  function automatic big_t mod_n(input big_t a, input big_t n, input int k);
    big_t r = a;
    for (int s = MAXW - k - 1; s >= 0; s--)
      if (r >= (n << s)) r = r - (n << s);
    return r;
  endfunction

  // a * b mod n, with a, b < n, b taken over its low bits bits
  function automatic big_t mod_mul(input big_t a, input big_t b, input big_t n,
                                   input int bits);
    big_t r = '0;
    for (int i = bits - 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= n) r = r - n;
      if (b[i]) begin
        r = r + a;
        if (r >= n) r = r - n;
      end
    end
    return r;
  endfunction

  // x * 2^-m mod n for x < n
  function automatic big_t div2_pow(input big_t x, input big_t n, input int m);
    big_t r = x;
    for (int i = 0; i < m; i++) r = r[0] ? (r + n) >> 1 : r >> 1;
    return r;
  endfunction

  // a * b * 2^-(k+2) mod n: the Montgomery product of the multiplier,
  // multiplicand given as b (the hardware input is 2b)
  function automatic big_t mont_ref(input big_t a, input big_t b, input big_t n,
                                    input int k);
    big_t am = mod_n(a, n, k);
    big_t bm = mod_n(b, n, k);
    return div2_pow(mod_mul(am, bm, n, k), n, k + 2);
  endfunction

  // 2^(2k+4) mod n, the domain-conversion constant
  function automatic big_t r2_of(input big_t n, input int k);
    big_t r = 1;
    for (int i = 0; i < 2 * k + 4; i++) begin
      r = r << 1;
      if (r >= n) r = r - n;
    end
    return r;
  endfunction

  // m^e mod n, e of ebits bits, m < n
  function automatic big_t mod_pow(input big_t m, input big_t e, input big_t n,
                                   input int k, input int ebits);
    big_t r = mod_n(1, n, k);
    for (int i = ebits - 1; i >= 0; i--) begin
      r = mod_mul(r, r, n, k);
      if (e[i]) r = mod_mul(r, m, n, k);
    end
    return r;
  endfunction

endpackage
