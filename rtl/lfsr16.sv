// lfsr16: 16-bit maximal-length Galois LFSR (polynomial
// x^16 + x^14 + x^13 + x^11 + 1) used by the test environments to make
// random interval lengths and random operands.  `clear` reloads SEED so
// every evaluation sees the same pseudo-random sequence; `en` advances it
// by one step per clock.  SEED must be non-zero.  The source asks only
// for random intervals and numbers; the generator is this design's choice.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  output logic [15:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (clear) q <= SEED;
    else if (en)    q <= {1'b0, q[15:1]} ^ (q[0] ? 16'hB400 : 16'h0000);
  end

endmodule
