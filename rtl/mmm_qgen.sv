// mmm_qgen: quotient look-ahead and skip detection.
//
// In iteration i the multiplier computes
//   S(i+1) = (S(i) + A_i * Bh + q_i * N) / 2,     Bh = 8 * B.
// Because Bh is a multiple of 8, the low three bits of every A*Bh term are
// zero, so the next two quotient bits depend only on the low bits of S(i),
// on q_i and on N[2:0], never on A. This block works them out in the same
// clock as the iteration's carry-save addition:
//   U        = (S(i) + q_i * N) mod 8
//   q(i+1)   = U[1]
//   V        = (U[2:1] + q(i+1) * N[1:0]) mod 4
//   q(i+2)   = V[1]
//   skip(i+1)= skip_ok & ~A_{i+1} & ~q(i+1)
// Iteration i+1 adds nothing when A_{i+1} = q(i+1) = 0; it is then only a
// division by two and is merged into the shift of the current step.
//
// S(i) is still held as the unshifted carry-save pair of the previous clock,
// so its low bits are taken as ((SS + SC) mod 32) >> sh with a 5-bit adder.
// Computing q(i+1), q(i+2) and skip(i+1) in parallel with the addition
// follows the source design; the equations above are derived for this
// implementation. Purely combinational.
module mmm_qgen (
  input  logic [4:0] ss_lo,    // SS[4:0] before the pending shift
  input  logic [4:0] sc_lo,    // SC[4:0] before the pending shift
  input  logic [1:0] sh,       // pending shift, 1 or 2 in iterations
  input  logic       q_cur,    // q_i
  input  logic [2:0] n_lo,     // N[2:0], N odd
  input  logic       a_next,   // A_{i+1}
  input  logic       skip_ok,  // iteration i+1 exists and may be skipped
  output logic       q_next,   // q_{i+1}
  output logic       q_next2,  // q_{i+2}
  output logic       skip      // skip_{i+1}
);

  logic [4:0] t_lo;   // (SS + SC) mod 32
  logic [2:0] s_lo;   // S(i) mod 8
  logic [2:0] u;
  logic [1:0] v;

  always_comb begin
    t_lo = ss_lo + sc_lo;
    unique case (sh)
      2'd0:    s_lo = t_lo[2:0];
      2'd1:    s_lo = t_lo[3:1];
      default: s_lo = t_lo[4:2];
    endcase
    u       = s_lo + (q_cur ? n_lo : 3'd0);
    q_next  = u[1];
    v       = u[2:1] + (q_next ? n_lo[1:0] : 2'd0);
    q_next2 = v[1];
    skip    = skip_ok & ~a_next & ~q_next;
  end

endmodule
