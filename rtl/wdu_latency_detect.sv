// wdu_latency_detect: Stage 1 of the WDU, signal latency detection.
//
// On every rising clock edge the undelayed monitored wire and each tap of the
// delay chain are captured into a vector of flip-flops. A tap whose delayed
// copy of the new value reached its flip-flop before the edge agrees with the
// undelayed capture; a tap that was still carrying the old value disagrees.
// Each tap register is XORed with the undelayed register, and the number of
// zeros in the resulting vector is the slack: how many buffer delays fit
// between the settling of the wire and the clock edge. A second register
// holds the undelayed value of the previous cycle; the slack is only valid
// when the wire changed, since without a transition every tap agrees and the
// count would read as the full chain.
//
// Interface: sig_in is the wire, taps the delay chain outputs; slack and
// slack_valid go to Stage 2. slack is forced to 0 when not valid (the "0"
// input of the output multiplexer). enable lets the unit be switched off
// between measurement periods. Timing: slack and slack_valid are
// combinational from the registers loaded at edge n, so the measurement of
// the value captured at edge n is presented during the cycle that follows
// it. Two edges after reset pass before the first value can be valid.
//
// Follows the reference design: registers, pairwise XOR, zero count,
// transition gating. Own choices: binary zero count as the encoding, the
// enable input, the two warm-up cycles after reset.
module wdu_latency_detect #(
  parameter  int unsigned TAPS  = wdu_pkg::TAPS_DEFAULT,
  localparam int unsigned LAT_W = $clog2(TAPS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             sig_in,
  input  logic [TAPS-1:0]  taps,
  output logic [LAT_W-1:0] slack,
  output logic             slack_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic            sig_q;     // undelayed capture, the reference copy
  logic            prev_q;    // undelayed capture of the previous cycle
  logic [TAPS-1:0] tap_q;     // delayed captures
  logic [1:0]      warm_q;    // sig_q and prev_q hold real captures

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q  <= 1'b0;
      prev_q <= 1'b0;
      tap_q  <= '0;
      warm_q <= '0;
    end else begin
      sig_q  <= sig_in;
      prev_q <= sig_q;
      tap_q  <= taps;
      warm_q <= {warm_q[0], 1'b1};
    end
  end

  // Pairwise comparison with the undelayed capture: 1 = tap was late.
  logic [TAPS-1:0]  late;
  logic [LAT_W-1:0] zeros;
  logic             transition;

  assign late       = tap_q ^ {TAPS{sig_q}};
  assign transition = sig_q ^ prev_q;

  always_comb begin
    zeros = '0;
    for (int unsigned k = 0; k < TAPS; k++) begin
      zeros = zeros + LAT_W'(!late[k]);
    end
  end

  assign slack_valid = enable && warm_q[1] && transition;
  assign slack       = slack_valid ? zeros : '0;
endmodule
