// wdu_top: wearout detection unit (WDU) for one monitored wire.
//
// Wearout mechanisms such as electromigration and gate-oxide breakdown make
// transistors and wires slower long before they fail. Inside a logic block
// the extra delay of many slightly worn cells adds up on each output, so the
// time at which an output settles within the clock period drifts later. The
// WDU measures that settling time online on an output wire and raises
// `failing` when it has moved away from its long-term history.
//
//   Stage 1  wdu_delay_chain + wdu_latency_detect: the wire and TAPS delayed
//            copies of it are captured at the clock edge; the number of
//            delayed copies that already show the new value is the slack.
//            Only cycles in which the wire toggled give a measurement.
//   Stage 2  wdu_latency_sampler + wdu_trix: every other measurement is
//            summed, SAMPLES per snapshot, and the snapshots are smoothed by
//            a triple exponential moving average (TRIX) that follows recent
//            trends.
//   Stage 3  wdu_long_term: one TRIX value in LT_INTERVAL is compared with a
//            slow running average of earlier ones; values that keep falling
//            below it by more than `threshold` (less slack, more latency)
//            set `failing`, others are folded into the average.
//
// Interface: clk, rst_n (asynchronous, active low); enable gates the
// measurements; sig_in is the monitored wire, which must change only at the
// launching clock edge plus the logic delay being measured; threshold is in
// TRIX units (one buffer of slack in every accepted transition equals
// SAMPLES * 2^ALPHA_SHIFT units). nv_* and save_req carry the Stage 3 state
// to and from nonvolatile storage. The intermediate results of each stage
// are brought out for observation.
//
// Timing: with the wire toggling every cycle a snapshot is ready every
// SAMPLE_EVERY*SAMPLES cycles, its TRIX value three cycles later, and Stage 3
// acts on one TRIX value in LT_INTERVAL.
//
// The structure and the sizes TAPS, BUF_DELAY_PS, SAMPLES, SAMPLE_EVERY and
// ALPHA_SHIFT follow the reference design. LT_INTERVAL, COUNT_W, PERSIST and
// the save/restore ports are choices of this design.
module wdu_top #(
  parameter  int unsigned TAPS         = wdu_pkg::TAPS_DEFAULT,
  parameter  int unsigned BUF_DELAY_PS = wdu_pkg::BUF_DELAY_PS_DEFAULT,
  parameter  int unsigned SAMPLES      = wdu_pkg::SAMPLES_DEFAULT,
  parameter  int unsigned SAMPLE_EVERY = wdu_pkg::SAMPLE_EVERY_DEFAULT,
  parameter  int unsigned ALPHA_SHIFT  = wdu_pkg::ALPHA_SHIFT_DEFAULT,
  parameter  int unsigned LT_INTERVAL  = wdu_pkg::LT_INTERVAL_DEFAULT,
  parameter  int unsigned COUNT_W      = wdu_pkg::COUNT_W_DEFAULT,
  parameter  int unsigned PERSIST      = wdu_pkg::PERSIST_DEFAULT,
  localparam int unsigned LAT_W        = $clog2(TAPS + 1),
  localparam int unsigned SUM_W        = $clog2(TAPS * SAMPLES + 1),
  localparam int unsigned TRIX_W       = SUM_W + ALPHA_SHIFT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               sig_in,
  input  logic [TRIX_W-1:0]  threshold,
  // nonvolatile state restore
  input  logic               nv_load,
  input  logic [TRIX_W-1:0]  nv_avg,
  input  logic [COUNT_W-1:0] nv_count,
  // Stage 1
  output logic [LAT_W-1:0]   slack,
  output logic               slack_valid,
  // Stage 2
  output logic [SUM_W-1:0]   sum,
  output logic               sum_valid,
  output logic [TRIX_W-1:0]  trix,
  output logic               trix_valid,
  // Stage 3
  output logic [TRIX_W-1:0]  avg,
  output logic [COUNT_W-1:0] count,
  output logic               exceed,
  output logic               save_req,
  output logic               failing
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [TAPS-1:0]   taps;
  logic [TRIX_W-1:0] ema1, ema2;
  logic              trix_busy, lt_busy;

  wdu_delay_chain #(
    .TAPS         (TAPS),
    .BUF_DELAY_PS (BUF_DELAY_PS)
  ) u_chain (
    .sig_in (sig_in),
    .taps   (taps)
  );

  wdu_latency_detect #(
    .TAPS (TAPS)
  ) u_detect (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .sig_in      (sig_in),
    .taps        (taps),
    .slack       (slack),
    .slack_valid (slack_valid)
  );

  wdu_latency_sampler #(
    .TAPS         (TAPS),
    .SAMPLES      (SAMPLES),
    .SAMPLE_EVERY (SAMPLE_EVERY)
  ) u_sampler (
    .clk         (clk),
    .rst_n       (rst_n),
    .slack       (slack),
    .slack_valid (slack_valid),
    .sum         (sum),
    .sum_valid   (sum_valid)
  );

  wdu_trix #(
    .IN_W        (SUM_W),
    .ALPHA_SHIFT (ALPHA_SHIFT)
  ) u_trix (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample       (sum),
    .sample_valid (sum_valid),
    .busy         (trix_busy),
    .ema1         (ema1),
    .ema2         (ema2),
    .trix         (trix),
    .trix_valid   (trix_valid)
  );

  wdu_long_term #(
    .TRIX_W      (TRIX_W),
    .COUNT_W     (COUNT_W),
    .LT_INTERVAL (LT_INTERVAL),
    .PERSIST     (PERSIST)
  ) u_long (
    .clk        (clk),
    .rst_n      (rst_n),
    .trix       (trix),
    .trix_valid (trix_valid),
    .threshold  (threshold),
    .nv_load    (nv_load),
    .nv_avg     (nv_avg),
    .nv_count   (nv_count),
    .avg        (avg),
    .count      (count),
    .failing    (failing),
    .exceed     (exceed),
    .save_req   (save_req),
    .busy       (lt_busy)
  );
endmodule
