// tb_mont_mult_modi: end-to-end test of the top level at its default size
// (K = 192).
//
// Drives start / x / y / n, waits for done1 and checks
//   * z < n and z * 2^(K+1) == x * y (mod n)  (independent modular check),
//   * the un-reduced engine result against the binary reference model,
//   * the number of iteration clocks against the model's schedule, and the
//     precomputation and conversion phases against their bounds.
// Operands: edge cases (0, n-1, tiny moduli, all-ones modulus, the NIST
// P-192 prime) and random odd moduli with random operands below them.
// It also counts how often each mechanism of the design happened - skipped
// steps, two-bit and one-bit shifts with the lost-carry correction, multi-
// clock precomputation and conversion, final subtraction taken and not
// taken, a start ignored while busy - and fails if one never did.
// A watchdog ends the run with a failure if it hangs.
module tb_mont_mult_modi;
  import mmm_pkg::*;
  import mmm_ref_pkg::*;

  localparam int K = 192;
  localparam int W = K + 5;

  logic         clk = 1'b0;
  logic         reset;
  logic         start;
  logic [K-1:0] x, y, n;
  logic [K-1:0] z;
  logic         done1;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_skip = 0, n_noskip = 0, n_lost1 = 0, n_lost2 = 0;
  int n_pre_multi = 0, n_conv_multi = 0, n_sub_taken = 0, n_sub_not = 0;
  int n_busy_start = 0;

  // per-operation clock counters
  int c_pre, c_iter, c_conv;
  int lat_min = 1 << 30, lat_max = 0, lat_sum = 0, n_ops = 0;
  int pre_max = 0, conv_max = 0, iter_min = 1 << 30;

  mont_mult_modi dut (
    .clk(clk), .reset(reset), .start(start),
    .x(x), .y(y), .n(n), .z(z), .done1(done1)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!reset) begin
      case (dut.u_core.state)
        ST_PRE:  c_pre++;
        ST_ITER: begin
          c_iter++;
          if (dut.u_core.skip) n_skip++; else n_noskip++;
        end
        ST_CONV: c_conv++;
        default: ;
      endcase
      if (dut.u_core.state inside {ST_ITER, ST_CONV} && dut.u_core.lost) begin
        if (dut.u_core.sh == 2'd2) n_lost2++;
        else                       n_lost1++;
      end
      if (dut.u_sub.valid_in) begin
        if (dut.u_sub.diff[K+1]) n_sub_not++; else n_sub_taken++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input big_t av, input big_t bv, input big_t nv,
                         input bit poke_busy);
    big_t s_ref, zz;
    int   it_ref, sk_ref, t;
    ref_mont(av, bv, nv, K, s_ref, it_ref, sk_ref);
    @(negedge clk);
    x = av[K-1:0]; y = bv[K-1:0]; n = nv[K-1:0];
    start = 1'b1;
    c_pre = 0; c_iter = 0; c_conv = 0;
    @(negedge clk);
    start = 1'b0;
    t = 0;
    while (!done1) begin
      @(negedge clk);
      t++;
      if (poke_busy && t == 20) begin
        // a second start while busy with other operands must be ignored
        x = ~x; y = ~y; n = ~n; start = 1'b1;
        n_busy_start++;
      end else begin
        start = 1'b0;
      end
    end
    zz = big_t'(z);
    check(zz < nv, $sformatf("z < n  (z=%h n=%h)", z, nv[K-1:0]));
    check(mont_ok(zz, av, bv, nv, K), $sformatf("z*2^(K+1) == x*y mod n (x=%h y=%h n=%h z=%h)",
          av[K-1:0], bv[K-1:0], nv[K-1:0], z));
    check(zz == ((s_ref >= nv) ? s_ref - nv : s_ref), "z equals reduced reference result");
    check(c_iter == it_ref, $sformatf("iteration clocks %0d, expected %0d", c_iter, it_ref));
    check(c_pre <= W / 2 + 2 && c_pre >= 1, $sformatf("precomputation clocks %0d", c_pre));
    check(c_conv <= W / 2 + 3 && c_conv >= 1, $sformatf("conversion clocks %0d", c_conv));
    // latency from the start edge to the done1 clock
    lat_sum += t + 1; n_ops++;
    if (t + 1 < lat_min) lat_min = t + 1;
    if (t + 1 > lat_max) lat_max = t + 1;
    if (c_pre > pre_max) pre_max = c_pre;
    if (c_conv > conv_max) conv_max = c_conv;
    if (c_iter < iter_min) iter_min = c_iter;
    if (c_pre > 2)  n_pre_multi++;
    if (c_conv > 2) n_conv_multi++;
  endtask

  function automatic big_t rand_mod(input int bits);
    big_t r;
    r = rand_bits(bits);
    r[0] = 1'b1;
    if (r < 3) r = 3;
    return r;
  endfunction

  initial begin
    big_t nv, av, bv, p192;
    reset = 1'b1; start = 1'b0; x = '0; y = '0; n = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;

    p192 = (big_t'(1) << 192) - (big_t'(1) << 64) - 1;

    // edge cases
    run_one(0, 0, p192, 0);
    run_one(p192 - 1, p192 - 1, p192, 0);
    run_one(1, 1, p192, 0);
    run_one(5, 7, 9, 0);
    run_one(14, 6, 15, 0);
    run_one(12, 11, 13, 0);
    run_one((big_t'(1) << K) - 2, (big_t'(1) << K) - 3, (big_t'(1) << K) - 1, 0);
    // a start pulse while busy
    run_one(rand_bits(K) % p192, rand_bits(K) % p192, p192, 1);

    // random full-size operands
    for (int r = 0; r < 60; r++) begin
      nv = rand_mod(K);
      if (r % 3 == 0) nv[K-1] = 1'b1;
      av = rand_bits(K) % nv;
      bv = rand_bits(K) % nv;
      run_one(av, bv, nv, 0);
    end
    // random smaller moduli, zero-extended to K bits
    for (int r = 0; r < 20; r++) begin
      int bits;
      bits = 4 + ($urandom % 150);
      nv = rand_mod(bits);
      av = rand_bits(K) % nv;
      bv = rand_bits(K) % nv;
      run_one(av, bv, nv, 0);
    end

    check(n_skip > 0,       "a skipped step happened");
    check(n_noskip > 0,     "a step without skip happened");
    check(n_lost1 > 0,      "lost-carry correction on a one-bit shift happened");
    check(n_lost2 > 0,      "lost-carry correction on a two-bit shift happened");
    check(n_pre_multi > 0,  "multi-clock precomputation happened");
    check(n_conv_multi > 0, "multi-clock conversion happened");
    check(n_sub_taken > 0,  "final subtraction taken");
    check(n_sub_not > 0,    "final subtraction not taken");
    check(n_busy_start > 0, "start while busy was applied");
    $display("mechanisms: skip=%0d noskip=%0d lost1=%0d lost2=%0d pre_multi=%0d conv_multi=%0d sub_taken=%0d sub_not=%0d busy_start=%0d",
             n_skip, n_noskip, n_lost1, n_lost2, n_pre_multi, n_conv_multi, n_sub_taken, n_sub_not, n_busy_start);
    $display("latency start->done1: min=%0d avg=%0d max=%0d clocks; max precomputation=%0d, max conversion=%0d, min iteration=%0d",
             lat_min, lat_sum / n_ops, lat_max, pre_max, conv_max, iter_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
