// mul_env: on-chip system environment for the multiplier problem.
//
// Two A_W-bit numbers are applied to the structure and held for HOLD
// clock cycles; in the last of those cycles `sample` is high for one
// clock, the structure's output is read and compared with `product`
// (a*b, 2*A_W bits).  The next pair is then applied.  The operands come
// from a 16-bit LFSR; HOLD (the "number of clock cycles" before the
// output is read) is this design's choice.  `clear` restarts the same
// operand sequence, `run` lets it advance.
module mul_env #(
  parameter int A_W  = 4,
  parameter int HOLD = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             run,
  output logic [A_W-1:0]   a,
  output logic [A_W-1:0]   b,
  output logic [2*A_W-1:0] product,
  output logic             sample
);

  localparam int CNT_W = $clog2(HOLD + 1);

  logic [15:0]      r;
  logic [CNT_W-1:0] hold_cnt;
  logic             next;

  assign next = run && (hold_cnt == CNT_W'(HOLD - 1));

  lfsr16 #(.SEED(16'h1D2B)) u_rng (
    .clk(clk), .rst_n(rst_n), .clear(clear), .en(next), .q(r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      hold_cnt <= '0;
    else if (clear)  hold_cnt <= '0;
    else if (next)   hold_cnt <= '0;
    else if (run)    hold_cnt <= hold_cnt + 1'b1;
  end

  assign a       = r[A_W-1:0];
  assign b       = r[2*A_W-1:A_W];
  assign product = (2*A_W)'(a) * (2*A_W)'(b);
  assign sample  = next;

endmodule
