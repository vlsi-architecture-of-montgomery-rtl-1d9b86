// tb_mmm_shift_align: self-checking test of the delayed shift (M1 / M2).
//
// For random carry-save pairs whose sum is a multiple of 2^sh (the only case
// the multiplier produces), checks ss_o + sc_o + lost == (ss + sc) >> sh for
// sh = 0, 1, 2, that each vector is shifted on its own, and that lost is set
// in both shift modes at least once.
module tb_mmm_shift_align;

  localparam int unsigned W = 45;

  logic [W-1:0] ss, sc, ss_o, sc_o;
  logic [1:0]   sh;
  logic         lost;

  int checks = 0;
  int failures = 0;
  int lost1 = 0, lost2 = 0;

  mmm_shift_align #(.W(W)) dut (.ss(ss), .sc(sc), .sh(sh), .ss_o(ss_o), .sc_o(sc_o), .lost(lost));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s ss=%h sc=%h sh=%0d ss_o=%h sc_o=%h lost=%b", what, ss, sc, sh, ss_o, sc_o, lost);
    end
  endtask

  initial begin
    logic [W:0] t;
    for (int k = 0; k < 900; k++) begin
      sh = 2'(k % 3);
      ss = W'({$urandom, $urandom}) >> 1;
      sc = W'({$urandom, $urandom}) >> 1;
      // force (ss + sc) to be a multiple of 2^sh by adjusting sc's low bits
      t  = {1'b0, ss} + {1'b0, sc};
      if (sh == 2'd1 && t[0])       sc = sc + 1'b1;
      if (sh == 2'd2 && t[1:0] != 0) sc = sc + W'(4 - t[1:0]);
      #1;
      t = ({1'b0, ss} + {1'b0, sc}) >> sh;
      check(({1'b0, ss_o} + {1'b0, sc_o} + (W+1)'(lost)) == t, "exact shifted sum");
      check(ss_o == (ss >> sh) && sc_o == (sc >> sh), "vectors shifted separately");
      if (sh == 2'd0) check(!lost, "no lost carry without shift");
      if (lost && sh == 2'd1) lost1++;
      if (lost && sh == 2'd2) lost2++;
    end
    check(lost1 > 0, "lost carry seen with one-bit shift");
    check(lost2 > 0, "lost carry seen with two-bit shift");
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
