// ir_env: on-chip system environment for the IR-detector problem.
//
// It presents a 10 kHz square wave during bursts of random length and
// silence between them, so that a construction cannot learn the answer
// from time alone, and it asks for the structure's output at random,
// unevenly spaced instants.  At each such instant `sample` is high for one
// clock and `present` tells whether the signal is on (the correct one-bit
// answer).  The clock rate is not part of the source; HALF_PERIOD is the
// half period of the 10 kHz wave in clock cycles (4 means an 80 kHz
// clock).  Burst and pause lengths are 2*HALF_PERIOD*(MIN_PERIODS + r)
// cycles and read gaps MIN_GAP + r' cycles, with r, r' from a 16-bit LFSR
// (r in 0..15, r' in 0..31); these ranges are this design's choice.
//
// `clear` restarts the same sequence (every individual is scored on the
// same stimulus); `run` lets it advance.  A burst starts with the wave high.
module ir_env #(
  parameter int HALF_PERIOD = 4,
  parameter int MIN_PERIODS = 2,
  parameter int MIN_GAP     = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic run,
  output logic sig,
  output logic present,
  output logic sample
);

  logic [15:0] r;
  logic [15:0] phase_cnt;
  logic [15:0] half_cnt;
  logic [15:0] gap_cnt;
  logic        phase_on;
  logic        wave;

  lfsr16 #(.SEED(16'hACE1)) u_rng (
    .clk(clk), .rst_n(rst_n), .clear(clear), .en(run), .q(r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_on  <= 1'b0;
      phase_cnt <= 16'(2 * HALF_PERIOD * MIN_PERIODS - 1);
      half_cnt  <= '0;
      wave      <= 1'b1;
      gap_cnt   <= 16'(MIN_GAP);
    end else if (clear) begin
      phase_on  <= 1'b0;
      phase_cnt <= 16'(2 * HALF_PERIOD * MIN_PERIODS - 1);
      half_cnt  <= '0;
      wave      <= 1'b1;
      gap_cnt   <= 16'(MIN_GAP);
    end else if (run) begin
      // burst / pause sequencing
      if (phase_cnt == 0) begin
        phase_on  <= !phase_on;
        phase_cnt <= 16'(2 * HALF_PERIOD) * (16'(MIN_PERIODS) + {12'd0, r[3:0]}) - 16'd1;
        half_cnt  <= '0;
        wave      <= 1'b1;
      end else begin
        phase_cnt <= phase_cnt - 16'd1;
        if (half_cnt == 16'(HALF_PERIOD - 1)) begin
          half_cnt <= '0;
          wave     <= !wave;
        end else begin
          half_cnt <= half_cnt + 16'd1;
        end
      end
      // read instants
      if (gap_cnt == 0) gap_cnt <= 16'(MIN_GAP) + {11'd0, r[8:4]};
      else              gap_cnt <= gap_cnt - 16'd1;
    end
  end

  assign sig     = phase_on && wave;
  assign present = phase_on;
  assign sample  = run && (gap_cnt == 0);

endmodule
