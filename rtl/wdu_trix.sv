// wdu_trix: second half of Stage 2, the TRIX (triple exponential moving
// average) unit.
//
// Each sample sum from the latency sampler is smoothed three times:
//   EMA1 = EMA1 + alpha*(sample - EMA1)
//   EMA2 = EMA2 + alpha*(EMA1   - EMA2)
//   TRIX = TRIX + alpha*(EMA2   - TRIX)
// with alpha = 2^-ALPHA_SHIFT, so the multiplication is an arithmetic shift.
// The three updates are identical, so one subtract-shift-add datapath is
// shared and the three levels are computed in three consecutive cycles,
// selected by a small phase counter. The registers keep ALPHA_SHIFT fraction
// bits below the sample's units so that small steps are not lost to
// truncation.
//
// The first sample after reset seeds all three registers, so the averages
// start at the observed latency instead of climbing up from zero.
//
// Interface: sample/sample_valid in (a new sample must not arrive while busy
// is high); ema1, ema2 and trix out in fixed point with ALPHA_SHIFT fraction
// bits; trix_valid pulses for one cycle when trix has been updated. Timing:
// trix_valid rises three clocks after the edge that accepts the sample (one
// clock for the seeding sample).
//
// Follows the reference design: the three EMA formulas, alpha = 2^-6, one
// shared EMA datapath over three cycles. Own choices: the fraction bits,
// seeding from the first sample, the phase counter.
module wdu_trix #(
  parameter  int unsigned IN_W        = 16,
  parameter  int unsigned ALPHA_SHIFT = wdu_pkg::ALPHA_SHIFT_DEFAULT,
  localparam int unsigned EMA_W       = IN_W + ALPHA_SHIFT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  sample,
  input  logic             sample_valid,
  output logic             busy,
  output logic [EMA_W-1:0] ema1,
  output logic [EMA_W-1:0] ema2,
  output logic [EMA_W-1:0] trix,
  output logic             trix_valid
);
  timeunit 1ps;
  timeprecision 1ps;
  import wdu_pkg::*;

  trix_phase_e      phase_q;
  logic             seeded_q;
  logic [EMA_W-1:0] x_q;        // sample in fixed point

  // Shared EMA datapath: nxt = prv + ((inp - prv) >>> ALPHA_SHIFT).
  logic [EMA_W-1:0] inp, prv, nxt;
  logic signed [EMA_W:0] diff;

  always_comb begin
    unique case (phase_q)
      TRIX_EMA2: begin inp = ema1; prv = ema2; end
      TRIX_EMA3: begin inp = ema2; prv = trix; end
      default:   begin inp = x_q;  prv = ema1; end
    endcase
    diff = $signed({1'b0, inp}) - $signed({1'b0, prv});
    nxt  = EMA_W'($signed({1'b0, prv}) + (diff >>> ALPHA_SHIFT));
  end

  assign busy = (phase_q != TRIX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= TRIX_IDLE;
      seeded_q   <= 1'b0;
      x_q        <= '0;
      ema1       <= '0;
      ema2       <= '0;
      trix       <= '0;
      trix_valid <= 1'b0;
    end else begin
      trix_valid <= 1'b0;
      unique case (phase_q)
        TRIX_IDLE: begin
          if (sample_valid) begin
            if (!seeded_q) begin
              ema1       <= {sample, ALPHA_SHIFT'(0)};
              ema2       <= {sample, ALPHA_SHIFT'(0)};
              trix       <= {sample, ALPHA_SHIFT'(0)};
              seeded_q   <= 1'b1;
              trix_valid <= 1'b1;
            end else begin
              x_q     <= {sample, ALPHA_SHIFT'(0)};
              phase_q <= TRIX_EMA1;
            end
          end
        end
        TRIX_EMA1: begin
          ema1    <= nxt;
          phase_q <= TRIX_EMA2;
        end
        TRIX_EMA2: begin
          ema2    <= nxt;
          phase_q <= TRIX_EMA3;
        end
        TRIX_EMA3: begin
          trix       <= nxt;
          trix_valid <= 1'b1;
          phase_q    <= TRIX_IDLE;
        end
      endcase
    end
  end

  // A new sample may only arrive while the datapath is idle.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 sample_valid |-> !busy)
    else $error("wdu_trix: sample arrived while busy");
endmodule
