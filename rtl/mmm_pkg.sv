// mmm_pkg: types shared by the Montgomery modular multiplier.
//
// The multiplier keeps its running value in carry-save form (a save-sum
// vector SS and a save-carry vector SC) and uses one configurable
// carry-save adder for every kind of cycle. This package names the
// controller states and the two adder modes so that all modules agree on
// their encodings. The encodings themselves are this design's choice.
package mmm_pkg;

  // Controller phases of one multiplication.
  //   ST_IDLE : waiting for start
  //   ST_PRE  : D-hat = B-hat + N, resolved to binary by repeated carry-save adds
  //   ST_ITER : the K+5 Montgomery iteration steps (index i = -1 .. K+3)
  //   ST_CONV : format conversion, SS + SC resolved to binary (until SC = 0)
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_PRE  = 2'd1,
    ST_ITER = 2'd2,
    ST_CONV = 2'd3
  } state_t;

  // Configuration of the carry-save adder.
  //   CCSA_FA   : each bit is one full adder, SS + SC + Y (3:2 compression)
  //   CCSA_HAHA : each bit is two half adders in series, SS + SC only, so a
  //               carry moves two bit positions per clock
  typedef enum logic {
    CCSA_FA   = 1'b0,
    CCSA_HAHA = 1'b1
  } ccsa_mode_t;

endpackage
