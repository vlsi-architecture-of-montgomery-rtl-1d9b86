// tb_mmm_final_sub: self-checking test of the registered conditional
// subtraction. K = 40. For random odd n and s in [0, 2n) (including s = n-1,
// n, 2n-1) checks z == s mod n one clock after valid_in, the one-clock
// valid_out pulse, and that z holds while valid_in is low.
module tb_mmm_final_sub;

  localparam int unsigned K = 40;

  logic         clk = 1'b0;
  logic         reset;
  logic         valid_in;
  logic [K:0]   s;
  logic [K-1:0] n;
  logic [K-1:0] z;
  logic         valid_out;

  int checks = 0;
  int failures = 0;

  mmm_final_sub #(.K(K)) dut (.clk(clk), .reset(reset), .valid_in(valid_in), .s(s), .n(n),
                              .z(z), .valid_out(valid_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s s=%h n=%h z=%h", what, s, n, z);
    end
  endtask

  initial begin
    logic [K:0] exp_z;
    reset = 1'b1; valid_in = 1'b0; s = '0; n = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(!valid_out, "no valid after reset");
    for (int t = 0; t < 400; t++) begin
      n = K'({$urandom, $urandom}) | K'(1);
      unique case (t % 5)
        0: s = (K+1)'(n) - 1;
        1: s = (K+1)'(n);
        2: s = 2 * (K+1)'(n) - 1;
        default: s = (K+1)'({$urandom, $urandom}) % (2 * (K+1)'(n));
      endcase
      exp_z = (s >= (K+1)'(n)) ? s - (K+1)'(n) : s;
      valid_in = 1'b1;
      @(negedge clk);
      valid_in = 1'b0;
      check(valid_out, "valid_out one clock after valid_in");
      check(z == exp_z[K-1:0], "z == s mod n");
      s = ~s;
      @(negedge clk);
      check(!valid_out, "valid_out is a single pulse");
      check(z == exp_z[K-1:0], "z holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
