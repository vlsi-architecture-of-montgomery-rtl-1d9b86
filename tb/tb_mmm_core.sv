// tb_mmm_core: self-checking test of the carry-save Montgomery engine at a
// reduced size (K = 12, so that operands can be swept densely).
//
// For every run it checks, against the binary reference schedule in
// mmm_ref_pkg:
//   * s equals the reference un-reduced result bit for bit, and s < 2n,
//   * s * 2^(K+1) == a * b (mod n),
//   * the D = 8b + n register after precomputation,
//   * the number of ST_ITER clocks equals K+5 minus the reference's skipped
//     steps, and ST_PRE / ST_CONV stay within W/2 + 2 clocks,
//   * s_valid is a single pulse and busy drops right after it.
// Operands: all a, b below small moduli and random triples for odd n < 2^K.
module tb_mmm_core;
  import mmm_pkg::*;
  import mmm_ref_pkg::*;

  localparam int K = 12;
  localparam int W = K + 5;

  logic         clk = 1'b0;
  logic         reset;
  logic         start;
  logic [K-1:0] a, b, n;
  logic [K:0]   s;
  logic         s_valid, busy;
  state_t       st;

  int checks = 0;
  int failures = 0;
  int c_pre, c_iter, c_conv, total_skips = 0;

  mmm_core #(.K(K)) dut (.clk(clk), .reset(reset), .start(start), .a(a), .b(b), .n(n),
                         .s(s), .s_valid(s_valid), .busy(busy), .state_o(st));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!reset) begin
      if (st == ST_PRE)  c_pre++;
      if (st == ST_ITER) c_iter++;
      if (st == ST_CONV) c_conv++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input big_t av, input big_t bv, input big_t nv);
    big_t s_ref, ss;
    int   it_ref, sk_ref;
    ref_mont(av, bv, nv, K, s_ref, it_ref, sk_ref);
    total_skips += sk_ref;
    @(negedge clk);
    a = av[K-1:0]; b = bv[K-1:0]; n = nv[K-1:0]; start = 1'b1;
    c_pre = 0; c_iter = 0; c_conv = 0;
    @(negedge clk);
    start = 1'b0;
    while (!s_valid) begin
      if (st == ST_ITER && c_iter == 1)
        check(big_t'(dut.d_r) == (bv << 3) + nv, "D = 8b + n after precomputation");
      @(negedge clk);
    end
    ss = big_t'(s);
    check(ss == s_ref, $sformatf("s=%0d expected %0d (a=%0d b=%0d n=%0d)", ss, s_ref, av, bv, nv));
    check(ss < 2 * nv, "s < 2n");
    check(mont_ok(ss % nv, av, bv, nv, K), "s*2^(K+1) == a*b mod n");
    check(c_iter == it_ref && it_ref == K + 5 - sk_ref,
          $sformatf("iteration clocks %0d, expected %0d", c_iter, it_ref));
    check(c_pre >= 1 && c_pre <= W / 2 + 2, $sformatf("precomputation clocks %0d", c_pre));
    check(c_conv >= 1 && c_conv <= W / 2 + 3, $sformatf("conversion clocks %0d", c_conv));
    @(negedge clk);
    check(!s_valid && !busy, "single s_valid pulse, then idle");
  endtask

  initial begin
    big_t nv;
    reset = 1'b1; start = 1'b0; a = '0; b = '0; n = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(!busy && !s_valid, "idle after reset");

    foreach (nv_list[i]) begin
      for (int av = 0; av < nv_list[i]; av++)
        for (int bv = 0; bv < nv_list[i]; bv++)
          run_one(av, bv, nv_list[i]);
    end
    for (int r = 0; r < 300; r++) begin
      nv = big_t'({$urandom % (1 << (K - 1)), 1'b1});
      if (nv < 3) nv = 3;
      run_one(big_t'($urandom) % nv, big_t'($urandom) % nv, nv);
    end
    check(total_skips > 0, "skipped steps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nv_list[4] = '{3, 9, 13, 15};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
