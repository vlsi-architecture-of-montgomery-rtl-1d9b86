// mmm_ref_pkg: reference model used by the multiplier testbenches.
//
// Plain binary (not carry-save) model of the iteration schedule: step
// i = -1 .. K+3 computes S = (S + A_i*8B + q_i*N) / 2 with q_i = S mod 2,
// and a step i+1 with A_{i+1} = q_{i+1} = 0 is merged into step i. It
// returns the un-reduced result and the number of iteration clocks, which
// the testbenches compare with the hardware. Also provides helpers for
// wide random numbers. Values are held in BIG bits, enough for K <= 256.
package mmm_ref_pkg;

  localparam int BIG = 600;
  typedef logic [BIG-1:0] big_t;

  // Binary model of the skip-capable Montgomery iteration schedule.
  function automatic void ref_mont(input big_t a, input big_t b, input big_t n,
                                   input int k, output big_t s_out,
                                   output int iter_clocks, output int skips);
    big_t s, bh, s1;
    int   i;
    logic q, q1;
    s  = '0;
    bh = b << 3;
    i  = -1;
    q  = 1'b0;
    iter_clocks = 0;
    skips = 0;
    while (i <= k + 3) begin
      logic ai, an;
      ai = (i >= 0 && i < k) ? a[i] : 1'b0;
      an = (i + 1 >= 0 && i + 1 < k) ? a[i+1] : 1'b0;
      s1 = s + (ai ? bh : '0) + (q ? n : '0);
      s1 = s1 >> 1;
      q1 = s1[0];
      iter_clocks++;
      if ((i + 1 <= k + 3) && !an && !q1) begin
        s  = s1 >> 1;
        q  = s[0];
        i += 2;
        skips++;
      end else begin
        s  = s1;
        q  = q1;
        i += 1;
      end
    end
    s_out = s;
  endfunction

  // Random value of exactly k bits (upper bits zero).
  function automatic big_t rand_bits(input int k);
    big_t r;
    r = '0;
    for (int w = 0; w < BIG / 32; w++) r[w*32 +: 32] = $urandom;
    if (k < BIG) r = r & ((big_t'(1) << k) - 1);
    return r;
  endfunction

  // Modular inverse check helper: true when z * 2^(k+1) == a * b (mod n).
  function automatic bit mont_ok(input big_t z, input big_t a, input big_t b,
                                 input big_t n, input int k);
    big_t lhs, rhs;
    lhs = (z << (k + 1)) % n;
    rhs = (a * b) % n;
    return lhs == rhs;
  endfunction

endpackage
