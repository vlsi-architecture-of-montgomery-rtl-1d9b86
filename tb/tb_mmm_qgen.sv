// tb_mmm_qgen: self-checking test of the quotient look-ahead.
//
// For random odd N, random S(i) and the correct q_i = S(i) mod 2, builds a
// carry-save pair whose sum is S(i) * 2^sh (sh = 1 or 2), then works out in
// full-width integer arithmetic
//   S(i+1) = (S(i) + A_i*8B + q_i*N) / 2,    q(i+1) = S(i+1) mod 2,
//   S(i+2) = (S(i+1) + A_{i+1}*8B + q(i+1)*N) / 2,  q(i+2) = S(i+2) mod 2,
// and compares q_next, q_next2 and skip with them.
module tb_mmm_qgen;

  logic [4:0] ss_lo, sc_lo;
  logic [1:0] sh;
  logic       q_cur, a_next, skip_ok;
  logic [2:0] n_lo;
  logic       q_next, q_next2, skip;

  int checks = 0;
  int failures = 0;
  int skips = 0;

  mmm_qgen dut (.ss_lo(ss_lo), .sc_lo(sc_lo), .sh(sh), .q_cur(q_cur), .n_lo(n_lo),
                .a_next(a_next), .skip_ok(skip_ok),
                .q_next(q_next), .q_next2(q_next2), .skip(skip));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint unsigned n, s, b, t, sc_full, ss_full, s1, s2;
    logic a_i, q1, q2;
    for (int k = 0; k < 2000; k++) begin
      n   = {$urandom % 1000000, 1'b1};
      b   = $urandom % 1000000;
      s   = $urandom % 1000000;
      a_i = 1'($urandom);
      a_next  = 1'($urandom);
      skip_ok = (k % 7 != 0);
      sh  = (k % 2 == 0) ? 2'd1 : 2'd2;
      q_cur = s[0];
      t   = s << sh;
      sc_full = longint'($urandom % 1000) & ~longint'(1);
      if (sc_full > t) sc_full = t;
      ss_full = t - sc_full;
      ss_lo = ss_full[4:0];
      sc_lo = sc_full[4:0];
      n_lo  = n[2:0];
      #1;
      s1 = (s + (a_i ? 8 * b : 0) + (q_cur ? n : 0)) / 2;
      q1 = s1[0];
      s2 = (s1 + (a_next ? 8 * b : 0) + (q1 ? n : 0)) / 2;
      q2 = s2[0];
      check(q_next == q1, $sformatf("q_next (s=%0d n=%0d sh=%0d)", s, n, sh));
      check(q_next2 == q2, $sformatf("q_next2 (s=%0d n=%0d sh=%0d)", s, n, sh));
      check(skip == (skip_ok && !a_next && !q1), "skip");
      if (skip) skips++;
    end
    check(skips > 0, "skip asserted at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
