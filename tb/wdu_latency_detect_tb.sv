// wdu_latency_detect_tb: drives Stage 1 with tap vectors that stand for a
// chosen arrival time. Each cycle the wire takes a new value; taps below the
// chosen slack already carry it, the others still carry the old one, and a
// few random cycles flip extra taps to test the zero count on vectors that
// are not thermometer codes. The expected slack is counted in the testbench
// and compared one cycle after the capturing edge. Cycles without a
// transition and cycles with enable low must give no valid measurement.
module wdu_latency_detect_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TAPS  = 38;
  localparam int unsigned LAT_W = $clog2(TAPS + 1);

  logic             clk = 1'b0, rst_n = 1'b0, enable = 1'b1;
  logic             sig_in = 1'b0;
  logic [TAPS-1:0]  taps = '0;
  logic [LAT_W-1:0] slack;
  logic             slack_valid;
  int checks = 0, failures = 0;
  int n_valid = 0, n_quiet = 0, n_off = 0;

  wdu_latency_detect #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev, nxt, exp_valid, en_d;
    int   exp_slack;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // settle: two edges with a stable wire
    repeat (3) @(negedge clk);
    prev = sig_in;
    for (int n = 0; n < 3000; n++) begin
      int z;
      logic [TAPS-1:0] v;
      // choose the stimulus for the next edge
      nxt    = ($urandom % 4 == 0) ? prev : ~prev;
      enable = ($urandom % 16 != 0);
      z      = $urandom % (TAPS + 1);
      for (int k = 0; k < TAPS; k++) v[k] = (k < z) ? nxt : prev;
      if ($urandom % 8 == 0) v = v ^ TAPS'($urandom);
      sig_in = nxt;
      taps   = v;
      exp_slack = 0;
      for (int k = 0; k < TAPS; k++) if (v[k] == nxt) exp_slack++;
      exp_valid = (nxt != prev);
      en_d = enable;
      @(posedge clk);
      #1;
      enable = en_d;
      checks++;
      if (slack_valid !== (exp_valid && en_d)) begin
        failures++;
        $display("cycle %0d: valid %0b expected %0b", n, slack_valid, exp_valid && en_d);
      end
      if (exp_valid && en_d) begin
        n_valid++;
        checks++;
        if (slack !== LAT_W'(exp_slack)) begin
          failures++;
          $display("cycle %0d: slack %0d expected %0d", n, slack, exp_slack);
        end
      end else begin
        if (!exp_valid) n_quiet++;
        else n_off++;
        checks++;
        if (slack !== '0) begin
          failures++;
          $display("cycle %0d: slack %0d while not valid", n, slack);
        end
      end
      prev = nxt;
      @(negedge clk);
    end
    checks++;
    if (n_valid == 0 || n_quiet == 0 || n_off == 0) begin
      failures++;
      $display("coverage: valid %0d quiet %0d disabled %0d", n_valid, n_quiet, n_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
