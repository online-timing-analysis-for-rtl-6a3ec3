// wdu_delay_chain: behavioural model of the Stage 1 delay line (not
// synthesizable logic; a real part is a chain of placed buffer cells).
//
// The monitored wire runs through TAPS buffers in series. Buffer k delays its
// input by BUF_DELAY_PS, and taps[k] is the wire delayed by (k+1) buffers.
// In silicon each buffer is five inverters; at about 20 ps per inverter in a
// 130 nm process that is 100 ps per buffer, so 38 buffers span 3.8 ns of a
// 5 ns (200 MHz) clock period. Both numbers follow the reference design; the
// 20 ps inverter delay is the single-inverter figure used for the wearout
// experiments.
//
// Interface: sig_in is the monitored wire; taps[TAPS-1:0] are the delayed
// copies, taps[0] the least delayed. Timing: pure propagation delay, no
// clock. Synthesis ignores the delays, so the model only has meaning in
// simulation.
module wdu_delay_chain #(
  parameter int unsigned TAPS         = wdu_pkg::TAPS_DEFAULT,
  parameter int unsigned BUF_DELAY_PS = wdu_pkg::BUF_DELAY_PS_DEFAULT
) (
  input  logic            sig_in,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(BUF_DELAY_PS) taps[0] = sig_in;

  for (genvar k = 1; k < TAPS; k++) begin : g_buf
    assign #(BUF_DELAY_PS) taps[k] = taps[k-1];
  end
endmodule
