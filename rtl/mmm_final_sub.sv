// mmm_final_sub: final conditional subtraction of the Montgomery product.
//
// The iterations leave S with 0 <= S < 2N. One comparison and subtraction
// brings it into [0, N): z = (S >= N) ? S - N : S. The subtraction is
// registered so that its K+1-bit borrow chain sits in a clock of its own and
// does not lengthen the carry-save iteration clock.
// Interface: s / n are sampled when valid_in is high; z and valid_out follow
// one clock later. valid_out is a one-clock pulse, z holds its value until
// the next valid_in. Synchronous, active-high reset.
// The conditional subtraction is the standard last step of Montgomery
// multiplication; doing it in a separate registered stage is this design's
// choice.
module mmm_final_sub #(
  parameter int unsigned K = 192
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         valid_in,
  input  logic [K:0]   s,          // 0 <= s < 2n
  input  logic [K-1:0] n,          // modulus
  output logic [K-1:0] z,          // s mod n
  output logic         valid_out
);

  logic [K+1:0] diff;   // s - n with a borrow bit on top

  always_comb diff = {1'b0, s} - {2'b00, n};

  always_ff @(posedge clk) begin
    if (reset) begin
      z         <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) z <= diff[K+1] ? s[K-1:0] : diff[K-1:0];
    end
  end

endmodule
