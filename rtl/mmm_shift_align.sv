// mmm_shift_align: delayed right shift of the carry-save pair (M1 / M2).
//
// The iteration registers hold SS and SC before the division by two of the
// Montgomery step; the shift is applied at the start of the next clock, so
// it is off the adder's critical path. sh selects no shift (precomputation
// and format conversion), one bit (normal step) or two bits (a step followed
// by a skipped step).
//
// Shifting the two vectors separately loses the carry that their dropped low
// bits would have produced: when SS + SC is a multiple of 2^sh, the low bits
// sum to either 0 or exactly 2^sh. That single lost unit is returned on
// `lost` and fed to the carry-save adder as carry-in, so that
//   ss_o + sc_o + lost == (ss + sc) >> sh   whenever (ss + sc) % 2^sh == 0.
// The multiplexers with a >>1 input follow the source design; the two-bit
// shift and the lost-carry correction are this implementation's.
// Purely combinational.
module mmm_shift_align #(
  parameter int unsigned W = 197
) (
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic [1:0]   sh,     // 0, 1 or 2 (3 is treated as 2)
  output logic [W-1:0] ss_o,
  output logic [W-1:0] sc_o,
  output logic         lost
);

  logic [2:0] low;   // sum of the bits shifted out

  always_comb begin
    unique case (sh)
      2'd0: begin
        ss_o = ss;
        sc_o = sc;
        low  = 3'd0;
        lost = 1'b0;
      end
      2'd1: begin
        ss_o = ss >> 1;
        sc_o = sc >> 1;
        low  = {2'b00, ss[0]} + {2'b00, sc[0]};
        lost = low[1];
      end
      default: begin
        ss_o = ss >> 2;
        sc_o = sc >> 2;
        low  = {1'b0, ss[1:0]} + {1'b0, sc[1:0]};
        lost = low[2];
      end
    endcase
  end

endmodule
