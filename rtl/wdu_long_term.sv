// wdu_long_term: Stage 3 of the WDU, long-term sampling and failure flag.
//
// The unit keeps two registers: AVG, a running average of the TRIX values it
// has taken, and COUNT, how many TRIX values that average holds. It takes
// only one TRIX value in LT_INTERVAL (coarse sampling). For each value taken:
//   - with COUNT = 0 the value becomes AVG;
//   - otherwise the distance gap = AVG - TRIX is formed. The measured
//     quantity is slack, which shrinks as latency grows, so a positive gap
//     means the wire now settles later than its long-term average. If gap
//     exceeds the threshold the value is not folded into AVG, and a run
//     counter advances; PERSIST such values in a row set the sticky failing
//     flag. A value inside the threshold clears the run counter and updates
//         AVG <= AVG + (TRIX - AVG) / (COUNT + 1),   COUNT <= COUNT + 1
//     The division runs on a serial restoring divider, one quotient bit per
//     clock, and truncates toward zero. COUNT saturates at its maximum, after
//     which the average weighs new values by 1/2^COUNT_W.
//
// AVG and COUNT are the state that has to survive power-down: after every
// change save_req pulses so that a controller can copy avg and count to
// nonvolatile memory, and nv_load loads them back (nv_avg, nv_count),
// cancelling an update that is in progress.
//
// Interface: trix/trix_valid from Stage 2; threshold in TRIX units; failing,
// exceed (pulse: a taken value was beyond the threshold), avg, count,
// save_req, busy. A TRIX value arriving while busy is dropped. Timing: an
// update writes AVG TRIX_W+2 clocks after the edge that takes the value
// (TRIX_W+1 divide steps and one write); a rejected value, or the first
// value, acts at the edge that takes it.
//
// Follows the reference design: AVG and COUNT registers, comparison of each
// new TRIX value against AVG, update only when inside the threshold, failure
// when the threshold is passed consistently, saving to nonvolatile storage.
// Own choices: "consistently" read as PERSIST consecutive values, the
// sampling interval, the counter width and saturation, the division-based
// average, and the save/restore handshake.
module wdu_long_term #(
  parameter  int unsigned TRIX_W      = 22,
  parameter  int unsigned COUNT_W     = wdu_pkg::COUNT_W_DEFAULT,
  parameter  int unsigned LT_INTERVAL = wdu_pkg::LT_INTERVAL_DEFAULT,
  parameter  int unsigned PERSIST     = wdu_pkg::PERSIST_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [TRIX_W-1:0]  trix,
  input  logic               trix_valid,
  input  logic [TRIX_W-1:0]  threshold,
  input  logic               nv_load,
  input  logic [TRIX_W-1:0]  nv_avg,
  input  logic [COUNT_W-1:0] nv_count,
  output logic [TRIX_W-1:0]  avg,
  output logic [COUNT_W-1:0] count,
  output logic               failing,
  output logic               exceed,
  output logic               save_req,
  output logic               busy
);
  timeunit 1ps;
  timeprecision 1ps;
  import wdu_pkg::*;

  localparam int unsigned NUM_W  = TRIX_W + 1;   // signed difference
  localparam int unsigned DEN_W  = COUNT_W + 1;  // COUNT + 1
  localparam int unsigned REM_W  = COUNT_W + 1;  // remainder < COUNT + 1
  localparam int unsigned INT_W  = (LT_INTERVAL > 1) ? $clog2(LT_INTERVAL) : 1;
  localparam int unsigned RUN_W  = $clog2(PERSIST + 1);
  localparam int unsigned STEP_W = $clog2(NUM_W + 1);

  lt_state_e          state_q;
  logic [INT_W-1:0]   int_q;      // position in the sampling interval
  logic [RUN_W-1:0]   run_q;      // consecutive values beyond the threshold
  logic [NUM_W-1:0]   num_q;      // |TRIX - AVG|, shifted out MSB first
  logic               neg_q;      // TRIX < AVG
  logic [DEN_W-1:0]   den_q;      // COUNT + 1
  logic [REM_W-1:0]   rem_q;
  logic [NUM_W-1:0]   quo_q;
  logic [STEP_W-1:0]  step_q;

  logic                     take;
  logic signed [NUM_W-1:0]  gap;       // AVG - TRIX
  logic                     beyond;
  logic [REM_W:0]           rem_sh;     // remainder shifted, < 2 (COUNT + 1)
  logic                     q_bit;

  assign take   = trix_valid && (int_q == '0) && (state_q == LT_IDLE);
  assign gap    = $signed({1'b0, avg}) - $signed({1'b0, trix});
  assign beyond = (gap > $signed({1'b0, threshold}));
  assign busy   = (state_q != LT_IDLE);

  // One restoring division step.
  assign rem_sh = {rem_q, num_q[NUM_W-1]};
  assign q_bit  = (rem_sh >= (REM_W + 1)'(den_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= LT_IDLE;
      int_q    <= '0;
      run_q    <= '0;
      num_q    <= '0;
      neg_q    <= 1'b0;
      den_q    <= '0;
      rem_q    <= '0;
      quo_q    <= '0;
      step_q   <= '0;
      avg      <= '0;
      count    <= '0;
      failing  <= 1'b0;
      exceed   <= 1'b0;
      save_req <= 1'b0;
    end else begin
      exceed   <= 1'b0;
      save_req <= 1'b0;
      if (trix_valid && state_q == LT_IDLE) begin
        int_q <= (32'(int_q) == LT_INTERVAL - 1) ? '0 : int_q + 1'b1;
      end
      if (nv_load) begin
        // a restore overrides any update in progress
        avg     <= nv_avg;
        count   <= nv_count;
        run_q   <= '0;
        state_q <= LT_IDLE;
      end else begin
      unique case (state_q)
        LT_IDLE: begin
          if (take) begin
            if (count == '0) begin
              avg      <= trix;
              count    <= COUNT_W'(1);
              save_req <= 1'b1;
            end else if (beyond) begin
              exceed <= 1'b1;
              if (32'(run_q) + 1 >= PERSIST) begin
                failing <= 1'b1;
              end
              if (32'(run_q) < PERSIST) begin
                run_q <= run_q + 1'b1;
              end
            end else begin
              run_q   <= '0;
              neg_q   <= gap > 0;
              num_q   <= (gap > 0) ? NUM_W'(gap) : NUM_W'(-gap);
              den_q   <= DEN_W'(count) + 1'b1;
              rem_q   <= '0;
              quo_q   <= '0;
              step_q  <= '0;
              state_q <= LT_DIVIDE;
            end
          end
        end
        LT_DIVIDE: begin
          rem_q  <= q_bit ? REM_W'(rem_sh - (REM_W + 1)'(den_q)) : REM_W'(rem_sh);
          quo_q  <= {quo_q[NUM_W-2:0], q_bit};
          num_q  <= {num_q[NUM_W-2:0], 1'b0};
          step_q <= step_q + 1'b1;
          if (32'(step_q) == NUM_W - 1) begin
            state_q <= LT_UPDATE;
          end
        end
        LT_UPDATE: begin
          avg      <= neg_q ? avg - TRIX_W'(quo_q) : avg + TRIX_W'(quo_q);
          if (count != '1) begin
            count <= count + 1'b1;
          end
          save_req <= 1'b1;
          state_q  <= LT_IDLE;
        end
        default: state_q <= LT_IDLE;
      endcase
      end
    end
  end
endmodule
