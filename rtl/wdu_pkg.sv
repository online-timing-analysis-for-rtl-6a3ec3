// wdu_pkg: shared constants and types of the wearout detection unit (WDU).
//
// The WDU watches one output wire of a logic block and measures, on every
// cycle in which the wire toggles, how much slack is left between the moment
// the wire settles and the capturing clock edge. A slow rise of that latency
// over the lifetime of the part is the symptom of wearout the unit looks for.
//
// The default sizes below are the ones of the reference implementation: a
// 38-tap delay chain of five-inverter buffers (190 inverter delays), 1024
// accepted slack values per sample, every other transition accepted, and an
// EMA weight of 2^-6. The long-term sampling interval, the counter width and
// the persistence of the failure test are choices of this design.
package wdu_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Stage 1: number of delay buffers and the delay of one buffer
  // (five inverters of about 20 ps each).
  localparam int unsigned TAPS_DEFAULT         = 38;
  localparam int unsigned BUF_DELAY_PS_DEFAULT = 100;

  // Stage 2: slack values summed into one sample, transition decimation and
  // the EMA weight alpha = 2^-ALPHA_SHIFT.
  localparam int unsigned SAMPLES_DEFAULT      = 1024;
  localparam int unsigned SAMPLE_EVERY_DEFAULT = 2;
  localparam int unsigned ALPHA_SHIFT_DEFAULT  = 6;

  // Stage 3: one TRIX value in LT_INTERVAL is used, the sample counter is
  // COUNT_W bits wide and saturates, and PERSIST consecutive TRIX values
  // beyond the threshold mark the wire as failing.
  localparam int unsigned LT_INTERVAL_DEFAULT  = 16;
  localparam int unsigned COUNT_W_DEFAULT      = 16;
  localparam int unsigned PERSIST_DEFAULT      = 4;

  // Phases of the shared EMA datapath of Stage 2: one EMA level per cycle.
  typedef enum logic [1:0] {
    TRIX_IDLE = 2'd0,
    TRIX_EMA1 = 2'd1,
    TRIX_EMA2 = 2'd2,
    TRIX_EMA3 = 2'd3
  } trix_phase_e;

  // States of the Stage 3 long-term unit.
  typedef enum logic [1:0] {
    LT_IDLE   = 2'd0,
    LT_DIVIDE = 2'd1,
    LT_UPDATE = 2'd2
  } lt_state_e;
endpackage
