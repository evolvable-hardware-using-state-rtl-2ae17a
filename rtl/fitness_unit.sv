// fitness_unit: scores one run of an individual, on chip.
//
// The score is   bias + f(x) + sum_i |y_i - x_i|   over n readings, where
// x_i is the structure's output and y_i the correct value at the i-th
// read strobe.  Lower is better.  f(x) punishes a constant output: the
// source does not give it, and here it is PENALTY when all n readings of
// x were equal and 0 otherwise.  The bias is 128 for the one-bit detector
// problem and 0 for the multiplier (chosen by the caller); n is a run-time
// input because the number of readings was changed (40 to 70) during a run.
//
// Interface: a one-clock `start` clears the score and sets `busy`; while
// busy every `sample` adds one reading; after the n-th reading `busy`
// falls and `done` rises in the same clock, and `fitness` then holds the
// result until the next start.  n = 0 ends at once with bias + PENALTY.
module fitness_unit #(
  parameter int W       = 8,
  parameter int N_W     = 8,
  parameter int FIT_W   = 16,
  parameter int PENALTY = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N_W-1:0]   n_reads,
  input  logic [7:0]       bias,
  input  logic             sample,
  input  logic [W-1:0]     x,
  input  logic [W-1:0]     y,
  output logic             busy,
  output logic             done,
  output logic [FIT_W-1:0] err_sum,
  output logic             constant,
  output logic [FIT_W-1:0] fitness
);

  logic [N_W-1:0] cnt;
  logic [W-1:0]   first;
  logic           changed;
  logic [W-1:0]   diff;

  assign diff = (y > x) ? (y - x) : (x - y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
      err_sum <= '0;
      first   <= '0;
      changed <= 1'b0;
    end else if (start) begin
      busy    <= (n_reads != 0);
      done    <= (n_reads == 0);
      cnt     <= '0;
      err_sum <= '0;
      first   <= '0;
      changed <= 1'b0;
    end else if (busy && sample) begin
      err_sum <= err_sum + FIT_W'(diff);
      if (cnt == 0)        first   <= x;
      else if (x != first) changed <= 1'b1;
      cnt <= cnt + 1'b1;
      if (cnt == n_reads - 1'b1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign constant = !changed;
  assign fitness  = FIT_W'(bias) + err_sum + (changed ? FIT_W'(0) : FIT_W'(PENALTY));

endmodule
