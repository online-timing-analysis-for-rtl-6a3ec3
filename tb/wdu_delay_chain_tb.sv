// wdu_delay_chain_tb: checks the behavioural delay line. After each edge of
// the input, tap k must still show the old value just before (k+1) buffer
// delays and the new value just after. Random gaps between input edges,
// all longer than the whole chain, exercise both edge directions.
module wdu_delay_chain_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TAPS  = 38;
  localparam int unsigned DELAY = 100;

  logic            sig_in;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  wdu_delay_chain #(.TAPS(TAPS), .BUF_DELAY_PS(DELAY)) dut (.sig_in(sig_in), .taps(taps));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_v;
    sig_in = 1'b0;
    #(TAPS * DELAY + 1000);
    for (int n = 0; n < 20; n++) begin
      old_v  = sig_in;
      sig_in = ~sig_in;
      for (int k = 0; k < TAPS; k++) begin
        fork
          automatic int kk = k;
          automatic logic ov = old_v;
          begin
            #((kk + 1) * DELAY - 10);
            checks++;
            if (taps[kk] !== ov) begin
              failures++;
              $display("tap %0d changed early", kk);
            end
            #20;
            checks++;
            if (taps[kk] !== ~ov) begin
              failures++;
              $display("tap %0d changed late", kk);
            end
          end
        join_none
      end
      #(TAPS * DELAY + 200 + ($urandom % 1000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
