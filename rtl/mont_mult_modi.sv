// mont_mult_modi: K-bit Montgomery modular multiplier, top level.
//
// z = x * y * 2^-(K+1) mod n, for an odd modulus n < 2^K and 0 <= x, y < n.
// With operands in Montgomery form (x' = x*R mod n, R = 2^(K+1)) the result is
// again in Montgomery form, so chains of multiplications, such as a modular
// exponentiation, need the conversion into and out of that form only once.
//
// Structure: mmm_core computes S = x*y*2^-(K+1) mod n as 0 <= S < 2n using
// a single configurable carry-save adder for the precomputation of y*8 + n,
// the K+5 skip-capable iteration steps and the final carry-save-to-binary
// conversion. mmm_final_sub then subtracts n once if S >= n.
//
// Interface: pulse start for one clock in idle with x, y, n stable; they
// are captured on that edge. done1 is high for one clock when z is valid; z
// holds until the next result. A start while busy is ignored. Latency from
// start to done1 is K+5 minus the skipped steps, plus the data-dependent
// precomputation and conversion (each at most about (K+5)/2 + 2 clocks),
// plus about 3 clocks of control. Synchronous, active-high reset.
//
// The name, the 192-bit default and the ports clk, reset, start, x, y, z,
// done1 follow the source design's top-level symbol. The modulus input n is
// taken from its flow chart, where the modulus enters beside the two
// operands; the final subtraction stage is this design's addition.
module mont_mult_modi
  import mmm_pkg::*;
#(
  parameter int unsigned K = 192
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic [K-1:0] n,
  output logic [K-1:0] z,
  output logic         done1
);

  logic [K:0]    s;
  logic          s_valid;
  logic          busy;
  logic [K-1:0]  n_hold;

  mmm_core #(.K(K)) u_core (
    .clk(clk), .reset(reset), .start(start),
    .a(x), .b(y), .n(n),
    .s(s), .s_valid(s_valid), .busy(busy), .state_o()
  );

  // Modulus captured with the operands, for the final subtraction.
  always_ff @(posedge clk) begin
    if (reset)                    n_hold <= '0;
    else if (start && !busy)      n_hold <= n;
  end

  mmm_final_sub #(.K(K)) u_sub (
    .clk(clk), .reset(reset), .valid_in(s_valid),
    .s(s), .n(n_hold), .z(z), .valid_out(done1)
  );

endmodule
