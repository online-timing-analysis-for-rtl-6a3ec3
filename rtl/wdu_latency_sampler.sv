// wdu_latency_sampler: first half of Stage 2, short-term latency sampling.
//
// Valid slack values from Stage 1 are decimated (one in SAMPLE_EVERY is
// accepted, every other one by default) and added into an accumulator, the
// adder and "latency sampler" register of the WDU. When SAMPLES values have
// been accumulated the sum is handed to the TRIX unit as one snapshot of the
// local latency and the accumulator restarts from zero. The sum is used as
// it is, without dividing by SAMPLES: all later arithmetic is linear, so the
// scale factor only changes the units of the threshold.
//
// Interface: slack/slack_valid in from Stage 1; sum/sum_valid out, sum_valid
// a one-cycle pulse with sum held until the next one. Timing: sum_valid is
// high in the cycle after the edge that accepts the SAMPLES-th value.
//
// Follows the reference design: every other transition, 1024 values per
// sample, sum taken as the snapshot. Own choice: which transition of a pair
// is accepted (the first after reset).
module wdu_latency_sampler #(
  parameter  int unsigned TAPS         = wdu_pkg::TAPS_DEFAULT,
  parameter  int unsigned SAMPLES      = wdu_pkg::SAMPLES_DEFAULT,
  parameter  int unsigned SAMPLE_EVERY = wdu_pkg::SAMPLE_EVERY_DEFAULT,
  localparam int unsigned LAT_W        = $clog2(TAPS + 1),
  localparam int unsigned SUM_W        = $clog2(TAPS * SAMPLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LAT_W-1:0] slack,
  input  logic             slack_valid,
  output logic [SUM_W-1:0] sum,
  output logic             sum_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SKIP_W = (SAMPLE_EVERY > 1) ? $clog2(SAMPLE_EVERY) : 1;
  localparam int unsigned CNT_W  = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;

  logic [SKIP_W-1:0] skip_q;   // position inside the decimation group
  logic [CNT_W-1:0]  cnt_q;    // values accumulated so far
  logic [SUM_W-1:0]  acc_q;    // running sum
  logic              take;
  logic [SUM_W-1:0]  acc_next;

  assign take     = slack_valid && (skip_q == '0);
  assign acc_next = acc_q + SUM_W'(slack);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_q    <= '0;
      cnt_q     <= '0;
      acc_q     <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (slack_valid) begin
        skip_q <= (32'(skip_q) == SAMPLE_EVERY - 1) ? '0 : skip_q + 1'b1;
      end
      if (take) begin
        if (32'(cnt_q) == SAMPLES - 1) begin
          sum       <= acc_next;
          sum_valid <= 1'b1;
          acc_q     <= '0;
          cnt_q     <= '0;
        end else begin
          acc_q <= acc_next;
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
