// wdu_latency_sampler_tb: feeds random slack values, valid on random cycles,
// into the sampler at its default sizes (1024 values per sample, every other
// valid value accepted). The testbench keeps its own count of valid values,
// the accepted ones and their sum, and checks each sum, that it appears one
// the cycle after the edge that accepts the 1024th value, and that no sum appears at any
// other time. Four full samples are checked.
module wdu_latency_sampler_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TAPS         = 38;
  localparam int unsigned SAMPLES      = 1024;
  localparam int unsigned SAMPLE_EVERY = 2;
  localparam int unsigned LAT_W        = $clog2(TAPS + 1);
  localparam int unsigned SUM_W        = $clog2(TAPS * SAMPLES + 1);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [LAT_W-1:0] slack = '0;
  logic             slack_valid = 1'b0;
  logic [SUM_W-1:0] sum;
  logic             sum_valid;
  int checks = 0, failures = 0;

  wdu_latency_sampler #(.TAPS(TAPS), .SAMPLES(SAMPLES), .SAMPLE_EVERY(SAMPLE_EVERY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_seen = 0, n_taken = 0, n_sums = 0;
    int acc = 0;
    logic expect_sum = 1'b0;
    int   expect_val = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_sums < 4) begin
      @(negedge clk);
      slack_valid = ($urandom % 3 != 0);
      slack       = slack_valid ? LAT_W'($urandom % (TAPS + 1)) : '0;
      @(posedge clk);
      #1;
      expect_sum = 1'b0;
      if (slack_valid) begin
        if (n_seen % SAMPLE_EVERY == 0) begin
          acc += int'(slack);
          n_taken++;
          if (n_taken == SAMPLES) begin
            expect_sum = 1'b1;
            expect_val = acc;
            acc = 0;
            n_taken = 0;
          end
        end
        n_seen++;
      end
      // sum_valid is high in the cycle after the accepting edge
      checks++;
      if (sum_valid !== expect_sum) begin
        failures++;
        $display("sum_valid %0b expected %0b", sum_valid, expect_sum);
      end
      if (expect_sum) begin
        checks++;
        if (sum !== SUM_W'(expect_val)) begin
          failures++;
          $display("sum %0d expected %0d", sum, expect_val);
        end
        n_sums++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
