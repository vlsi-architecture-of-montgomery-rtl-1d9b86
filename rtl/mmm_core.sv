// mmm_core: carry-save Montgomery multiplication engine with one CCSA.
//
// Computes S = A * B * 2^-(K+1) mod N, returned as 0 <= S < 2N in binary,
// for odd N < 2^K and A, B < N. All additions, including the two carry
// propagations, are done by the single configurable carry-save adder
// (mmm_ccsa); no wide carry-propagate adder is used.
//
// One multiplication runs through three phases (state_t in mmm_pkg):
//  1. ST_PRE  - precomputation. Bh = 8*B is only wiring. D = Bh + N is
//     formed by loading (SS, SC) = (Bh, N) and repeating the carry-save
//     addition SS + SC + 0 (adder in two-half-adder mode) until SC = 0.
//  2. ST_ITER - K+5 iteration steps with index i = -1 .. K+3. Step i adds
//     Y = 0, N, Bh or D (chosen by A_i and q_i) to the carry-save pair with
//     the adder in full-adder mode. The division by two is not done in the
//     same clock: the pair is stored unshifted and shifted at the start of
//     the next clock (mmm_shift_align). mmm_qgen works out q_{i+1}, q_{i+2}
//     and skip_{i+1} in parallel with the addition; when skip_{i+1} is set,
//     step i+1 (which would add zero) is dropped and the next clock shifts by
//     two instead of one. Step -1 starts from q = 0 and A_{-1} = 0 so that
//     the look-ahead is primed. Because B is replaced by Bh = 8B, three extra
//     steps (K+4 instead of K+1 real ones) divide the factor 8 out again.
//  3. ST_CONV - format conversion: the pending shift is applied and then
//     SS + SC + 0 is repeated in two-half-adder mode until SC = 0; SS is the
//     binary result.
//
// Timing: start is accepted in ST_IDLE. PRE and CONV take a data-dependent
// number of clocks (at most about W/2 each, W = K+5), ITER takes K+5 minus
// the number of skipped steps. s_valid is high for exactly one clock at the
// end of CONV, with the result on s; the engine is idle again on the next
// clock. Synchronous, active-high reset.
//
// Width: every value stays below 18N < 2^(K+5), so the datapath is W = K+5
// bits wide. The phase structure, the one-level CCSA, the D = B+N
// precomputation, the K+5 steps with skipping and the delayed shift follow
// the source design; the register widths, the state encoding, the
// lost-carry correction of the shift and the handshake are this design's.
module mmm_core
  import mmm_pkg::*;
#(
  parameter int unsigned K = 192
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  output logic [K:0]   s,        // result, valid with s_valid
  output logic         s_valid,
  output logic         busy,
  output state_t       state_o    // current phase, for observation
);

  localparam int unsigned W  = K + 5;
  localparam int unsigned JW = $clog2(K + 6);
  localparam logic [JW-1:0] J_LAST = JW'(K + 4);   // index i = K+3

  state_t        state;
  logic [K:0]    a_sh;     // A shifted so that a_sh[0] = A_i, a_sh[1] = A_{i+1}
  logic [W-1:0]  bh;       // Bh = 8 * B
  logic [K-1:0]  n_r;      // N
  logic [W-1:0]  d_r;      // D = Bh + N
  logic [W-1:0]  ss, sc;   // carry-save pair, before the pending shift
  logic [1:0]    sh;       // pending shift
  logic          q_r;      // q_i
  logic [JW-1:0] j;        // i + 1

  // datapath
  logic [W-1:0] ss_a, sc_a;
  logic         lost;
  logic [W-1:0] y_op;
  ccsa_mode_t   mode;
  logic [W-1:0] sum_n, carry_n;
  logic         q1, q2, skip;
  logic [JW-1:0] j_next;

  mmm_shift_align #(.W(W)) u_align (
    .ss(ss), .sc(sc), .sh(sh), .ss_o(ss_a), .sc_o(sc_a), .lost(lost)
  );

  always_comb begin
    unique case ({a_sh[0], q_r})
      2'b00: y_op = '0;
      2'b01: y_op = W'(n_r);
      2'b10: y_op = bh;
      2'b11: y_op = d_r;
    endcase
    mode = (state == ST_ITER) ? CCSA_FA : CCSA_HAHA;
  end

  mmm_ccsa #(.W(W)) u_ccsa (
    .x(ss_a), .y(sc_a), .z(y_op), .cin(lost), .mode(mode),
    .sum(sum_n), .carry(carry_n)
  );

  mmm_qgen u_qgen (
    .ss_lo(ss[4:0]), .sc_lo(sc[4:0]), .sh(sh), .q_cur(q_r),
    .n_lo(n_r[2:0]), .a_next(a_sh[1]), .skip_ok(j < J_LAST),
    .q_next(q1), .q_next2(q2), .skip(skip)
  );

  always_comb j_next = j + (skip ? JW'(2) : JW'(1));

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= ST_IDLE;
      a_sh  <= '0;
      bh    <= '0;
      n_r   <= '0;
      d_r   <= '0;
      ss    <= '0;
      sc    <= '0;
      sh    <= 2'd0;
      q_r   <= 1'b0;
      j     <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          a_sh  <= {a, 1'b0};            // A_{-1} = 0
          bh    <= W'({b, 3'b000});
          n_r   <= n;
          ss    <= W'({b, 3'b000});
          sc    <= W'(n);
          sh    <= 2'd0;
          state <= ST_PRE;
        end
        ST_PRE: begin
          if (sc == '0) begin
            d_r   <= ss;
            ss    <= '0;
            sc    <= '0;
            sh    <= 2'd0;
            q_r   <= 1'b0;
            j     <= '0;
            state <= ST_ITER;
          end else begin
            ss <= sum_n;
            sc <= carry_n;
          end
        end
        ST_ITER: begin
          ss   <= sum_n;
          sc   <= carry_n;
          sh   <= skip ? 2'd2 : 2'd1;
          q_r  <= skip ? q2 : q1;
          a_sh <= skip ? (a_sh >> 2) : (a_sh >> 1);
          j    <= j_next;
          if (j_next > J_LAST) state <= ST_CONV;
        end
        ST_CONV: begin
          if (sh == 2'd0 && sc == '0) begin
            state <= ST_IDLE;
          end else begin
            ss <= sum_n;
            sc <= carry_n;
            sh <= 2'd0;
          end
        end
      endcase
    end
  end

  always_comb begin
    s_valid = (state == ST_CONV) && (sh == 2'd0) && (sc == '0);
    s       = ss[K:0];
    busy    = (state != ST_IDLE);
    state_o = state;
  end

  // A pending shift must only drop bits whose carry-save sum is zero modulo
  // the shift, otherwise the division by two would not be exact.
  a_shift1_exact: assert property (@(posedge clk) disable iff (reset)
    (state inside {ST_ITER, ST_CONV} && sh == 2'd1) |-> (ss[0] == sc[0]));
  a_shift2_exact: assert property (@(posedge clk) disable iff (reset)
    (state inside {ST_ITER, ST_CONV} && sh == 2'd2) |-> (2'(ss[1:0] + sc[1:0]) == 2'd0));

endmodule
