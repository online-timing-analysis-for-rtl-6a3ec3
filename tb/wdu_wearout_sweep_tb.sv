// wdu_wearout_sweep_tb: accelerated-wearout sweep on the unit at its default
// sizes, with a 5 ns clock.
//
// The watched wire behaves like a data-dependent logic output: each cycle it
// toggles (or, one cycle in eight, holds) and settles at a random time
// between 1000 and 3000 ps after the edge. Wearout is modelled as an extra
// delay added to every arrival, raised in steps of 20 ps every 32 snapshots.
//   1 from reset, the unit learns the healthy latency for 8 long-term samples;
//     its state (avg, count) is taken as the value a controller would have
//     saved;
//   2 the unit is reset again (a power cycle) and the saved average is
//     restored with a long count standing for a long service life;
//   3 the extra delay is swept upward from 0 until the unit flags the wire.
// Checked: every slack value against the arrival time that produced it,
// every snapshot sum, no flag while the extra delay is 100 ps or less
// (half the 2-buffer threshold), and a flag before the extra delay reaches
// 20% of the clock period (1000 ps), the usual timing guard band.
module wdu_wearout_sweep_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned PERIOD  = 5000;
  localparam int unsigned SAMPLES = 1024;
  localparam int unsigned UNIT    = 1024 * 64;

  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b1, sig_in = 1'b0;
  logic [21:0] threshold = 22'(2 * UNIT);
  logic        nv_load = 1'b0;
  logic [21:0] nv_avg = '0;
  logic [15:0] nv_count = '0;
  logic [5:0]  slack;
  logic        slack_valid;
  logic [15:0] sum;
  logic        sum_valid;
  logic [21:0] trix;
  logic        trix_valid;
  logic [21:0] avg;
  logic [15:0] count;
  logic        exceed, save_req, failing;

  wdu_top dut (.*);

  always #(PERIOD / 2) clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned extra = 0;                       // wearout delay, ps
  int unsigned launched_arrival = 0, measured_arrival = 0;

  initial begin
    int unsigned a;
    forever begin
      @(posedge clk);
      // arrivals kept off the 100 ps grid so no tap is on the edge
      a = 1000 + ($urandom % 20) * 100 + 50 + extra;
      if ($urandom % 8 != 0) begin
        #(a);
        sig_in = ~sig_in;
        launched_arrival = a;
      end
    end
  end

  always @(posedge clk) measured_arrival <= launched_arrival;

  function automatic int exp_slack(int unsigned arr);
    int s = (int'(PERIOD) - int'(arr)) / 100;
    return (s > 38) ? 38 : s;
  endfunction

  int ref_seen = 0, ref_sum = 0, n_sums = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (sum_valid) begin
        n_sums++;
        checks++;
        if (int'(sum) != ref_sum) begin
          failures++;
          $display("%0t sum %0d expected %0d", $time, sum, ref_sum);
        end
        ref_sum = 0;
      end
      if (slack_valid) begin
        checks++;
        if (int'(slack) != exp_slack(measured_arrival)) begin
          failures++;
          $display("%0t slack %0d expected %0d", $time, slack, exp_slack(measured_arrival));
        end
        if (ref_seen % 2 == 0) ref_sum += int'(slack);
        ref_seen++;
      end
    end else begin
      ref_seen = 0;
      ref_sum  = 0;
    end
  end

  task automatic wait_snapshots(int n);
    repeat (n) @(posedge sum_valid);
  endtask

  initial begin
    logic [21:0] saved_avg;
    logic [15:0] saved_count;
    int unsigned flagged_at;
    // 1: learn the healthy latency
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    wait_snapshots(8 * 16);
    repeat (40) @(posedge clk);
    saved_avg   = avg;
    saved_count = count;
    $display("learned avg %0d (%0.2f buffers of slack) over %0d samples",
             saved_avg, real'(saved_avg) / real'(UNIT), saved_count);
    checks++;
    if (saved_count < 16'd4 || failing) begin
      failures++;
      $display("learning phase: count %0d failing %0b", saved_count, failing);
    end
    // 2: power cycle and restore
    @(posedge clk) #100 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    @(posedge clk) #100;
    nv_avg   = saved_avg;
    nv_count = 16'd5000;
    nv_load  = 1'b1;
    @(posedge clk) #100;
    nv_load  = 1'b0;
    checks++;
    if (avg != saved_avg || count != 16'd5000) begin
      failures++;
      $display("restore failed");
    end
    // 3: sweep the wearout delay
    flagged_at = 0;
    while (extra < 1000 && !failing) begin
      wait_snapshots(32);
      if (!failing) extra += 20;
      if (extra <= 100) begin
        checks++;
        if (failing) begin
          failures++;
          $display("flagged at only %0d ps of extra delay", extra);
        end
      end
    end
    flagged_at = extra;
    checks++;
    if (!failing) begin
      failures++;
      $display("not flagged before 20%% of the clock period");
    end
    $display("flagged with %0d ps of extra delay (%0.1f%% of the clock period), %0d snapshots",
             flagged_at, 100.0 * real'(flagged_at) / real'(PERIOD), n_sums);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
