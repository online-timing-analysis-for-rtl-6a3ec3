// wdu_trix_tb: sends 1000 random sample sums (a noisy level with one step in
// the middle) through the TRIX unit at its default sizes (16-bit samples,
// alpha = 2^-6) and compares EMA1, EMA2 and TRIX after every sample with a
// model kept in 64-bit integers with the same fixed point. It also checks
// that trix_valid follows the accepting edge at once for the seeding sample
// and three edges later for every other one, and that the averages settle
// at the new level after the step.
module wdu_trix_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned IN_W  = 16;
  localparam int unsigned SHIFT = 6;
  localparam int unsigned EMA_W = IN_W + SHIFT;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [IN_W-1:0]  sample = '0;
  logic             sample_valid = 1'b0;
  logic             busy;
  logic [EMA_W-1:0] ema1, ema2, trix;
  logic             trix_valid;
  int checks = 0, failures = 0;

  wdu_trix #(.IN_W(IN_W), .ALPHA_SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ema_step(longint prev, longint inp);
    longint d = inp - prev;
    // floor division by 2^SHIFT
    if (d >= 0) return prev + d / (longint'(1) << SHIFT);
    else        return prev - ((-d + (longint'(1) << SHIFT) - 1) / (longint'(1) << SHIFT));
  endfunction

  initial begin
    longint m1 = 0, m2 = 0, m3 = 0;
    int     lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      int level, s;
      longint x;
      level = (n < 300) ? 30000 : 26000;
      s     = level + int'($urandom % 2001) - 1000;
      x     = longint'(s) << SHIFT;
      @(negedge clk);
      sample = IN_W'(s);
      sample_valid = 1'b1;
      @(negedge clk);
      sample_valid = 1'b0;
      if (n == 0) begin
        m1 = x; m2 = x; m3 = x;
      end else begin
        m1 = ema_step(m1, x);
        m2 = ema_step(m2, m1);
        m3 = ema_step(m3, m2);
      end
      lat = 1;
      while (!trix_valid && lat < 10) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != ((n == 0) ? 1 : 4)) begin  // counted from the accepting edge
        failures++;
        $display("sample %0d: trix_valid after %0d clocks", n, lat);
      end
      checks += 3;
      if (ema1 !== EMA_W'(m1) || ema2 !== EMA_W'(m2) || trix !== EMA_W'(m3)) begin
        failures++;
        $display("sample %0d: %0d %0d %0d expected %0d %0d %0d", n, ema1, ema2, trix, m1, m2, m3);
      end
      if ($urandom % 4 == 0) repeat ($urandom % 5) @(negedge clk);
    end
    // after 700 samples at the new level the TRIX must be within 1% of it
    checks++;
    if (int'(trix >> SHIFT) < 25740 || int'(trix >> SHIFT) > 26260) begin
      failures++;
      $display("trix did not settle: %0d", trix >> SHIFT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
