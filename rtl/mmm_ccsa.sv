// mmm_ccsa: configurable carry-save adder (CCSA), W bits wide.
//
// Every bit position is built from two half adders. The first adds x and y.
// The second adds the first one's sum to a third input whose source is the
// configuration:
//   CCSA_FA   : the third input is z; the two half-adder carries are ORed, so
//               the pair is one full adder and (sum, carry) = x + y + z + cin,
//               a plain 3:2 carry-save addition.
//   CCSA_HAHA : the third input is the first half adder's carry from the bit
//               below (cin at bit 0); z is ignored. The two half adders are in
//               series, so (sum, carry) = x + y + cin with every carry moved
//               two places per use. Repeating this until carry = 0 turns a
//               carry-save pair into binary in half the clocks a single
//               carry-save adder would need.
// The carry vector is already weighted (shifted left by one); cin fills its
// bit 0 in FA mode. The carry out of bit W-1 is dropped: the caller keeps
// every total below 2^W.
//
// The idea of a CSA that is either one full adder or two serial half adders
// follows the source design; the exact cell wiring and the cin input are this
// implementation's. Purely combinational.
module mmm_ccsa
  import mmm_pkg::*;
#(
  parameter int unsigned W = 197
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  input  ccsa_mode_t   mode,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s_a, c_a;   // first half adder: x + y
  logic [W-1:0] z_in;       // third input of each bit
  logic [W-1:0] s_b, c_b;   // second half adder: s_a + z_in

  always_comb begin
    s_a  = x ^ y;
    c_a  = x & y;
    z_in = (mode == CCSA_FA) ? z : {c_a[W-2:0], cin};
    s_b  = s_a ^ z_in;
    c_b  = s_a & z_in;
    sum  = s_b;
    if (mode == CCSA_FA) carry = {c_a[W-2:0] | c_b[W-2:0], cin};
    else                 carry = {c_b[W-2:0], 1'b0};
  end

endmodule
