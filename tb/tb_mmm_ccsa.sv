// tb_mmm_ccsa: self-checking test of the configurable carry-save adder.
//
// Random and corner vectors at W = 37 (odd width, several 32-bit words).
// Full-adder mode: sum + carry == x + y + z + cin (mod 2^W) and carry[0] ==
// cin; each sum bit is checked as the XOR of the three inputs.
// Two-half-adder mode: sum + carry == x + y + cin and carry[0] == 0.
// Repeating the two-half-adder step until carry == 0 must give x + y + cin
// in binary within W/2 + 1 steps, the property the multiplier relies on.
module tb_mmm_ccsa;
  import mmm_pkg::*;

  localparam int unsigned W = 37;

  logic [W-1:0] x, y, z, sum, carry;
  logic         cin;
  ccsa_mode_t   mode;

  int checks = 0;
  int failures = 0;

  mmm_ccsa #(.W(W)) dut (.x(x), .y(y), .z(z), .cin(cin), .mode(mode),
                         .sum(sum), .carry(carry));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s x=%h y=%h z=%h cin=%b sum=%h carry=%h", what, x, y, z, cin, sum, carry);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [W:0] total;
    logic [W-1:0] a, c;
    int steps;
    for (int t = 0; t < 600; t++) begin
      // keep x + y + z below 2^W as in the multiplier, except a few wraps
      x = rnd() >> 2; y = rnd() >> 2; z = rnd() >> 2; cin = 1'($urandom);
      if (t < 4) begin x = '1 >> 2; y = '1 >> 2; z = '1 >> 2; cin = 1'b1; end
      mode = CCSA_FA;
      #1;
      total = {1'b0, x} + {1'b0, y} + {1'b0, z} + (W+1)'(cin);
      check(W'(sum + carry) == total[W-1:0], "FA sum+carry");
      check(carry[0] == cin, "FA carry[0] == cin");
      check(sum == (x ^ y ^ z), "FA sum bits");

      mode = CCSA_HAHA;
      #1;
      total = {1'b0, x} + {1'b0, y} + (W+1)'(cin);
      check(W'(sum + carry) == total[W-1:0], "HAHA sum+carry");
      check(carry[0] == 1'b0, "HAHA carry[0] == 0");

      // convergence of repeated two-half-adder steps
      a = x; c = y; steps = 0;
      x = a; y = c; cin = 1'($urandom);
      total = {1'b0, a} + {1'b0, c} + (W+1)'(cin);
      while (y != '0 || cin) begin
        #1;
        x = sum; y = carry; cin = 1'b0; steps++;
        if (steps > W) break;
      end
      #1;
      check(x == total[W-1:0], "HAHA repeated reaches binary sum");
      check(steps <= W / 2 + 1, $sformatf("HAHA converged in %0d steps", steps));
    end
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
