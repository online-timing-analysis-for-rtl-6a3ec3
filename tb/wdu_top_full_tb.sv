// wdu_top_full_tb: one complete detection with the unit at its default
// sizes (38 taps of 100 ps, 1024 values per snapshot, every other
// transition, alpha = 2^-6, one TRIX value in 16 taken, 16-bit counter,
// 4 excursions to fail) and a 5 ns clock.
//
// The monitored wire toggles every cycle, 1250 ps after the edge (37 taps of
// slack). A long history of that latency is restored into Stage 3 as it
// would be from nonvolatile storage. After a stretch of normal operation the
// wire slows by 400 ps (33 taps of slack, 8% of the clock period) and the
// unit must flag it. Checked: every slack value, every snapshot sum, the
// 2048-cycle snapshot period, the settled TRIX value, that nothing is
// flagged before the slowdown and that the flag comes after it.
module wdu_top_full_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned PERIOD  = 5000;
  localparam int unsigned SAMPLES = 1024;
  localparam int unsigned UNIT    = 1024 * 64;   // one tap in TRIX units

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
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned arrival = 1250;
  int unsigned launched_arrival = 1250, measured_arrival = 1250;

  initial begin
    int unsigned a;
    forever begin
      @(posedge clk);
      a = arrival;
      #(a);
      sig_in = ~sig_in;
      launched_arrival = a;
    end
  end

  always @(posedge clk) measured_arrival <= launched_arrival;

  function automatic int exp_slack(int unsigned arr);
    int s = (int'(PERIOD) - int'(arr)) / 100;
    return (s > 38) ? 38 : s;
  endfunction

  int ref_seen = 0, ref_sum = 0, n_sums = 0, n_exceed = 0, n_update = 0;
  longint last_sum_cycle = -1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (sum_valid) begin
        n_sums++;
        checks++;
        if (int'(sum) != ref_sum) begin
          failures++;
          $display("%0t sum %0d expected %0d", $time, sum, ref_sum);
        end
        if (last_sum_cycle >= 0) begin
          checks++;
          if (cycle - last_sum_cycle != 2 * SAMPLES) begin
            failures++;
            $display("snapshot period %0d", cycle - last_sum_cycle);
          end
        end
        last_sum_cycle = cycle;
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
      if (exceed) n_exceed++;
      if (save_req) n_update++;
    end
  end

  initial begin
    longint t_step, t_flag;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    // restore a history of 5000 long-term samples at 37 taps of slack
    @(posedge clk) #100;
    nv_avg   = 22'(37 * UNIT);
    nv_count = 16'd5000;
    nv_load  = 1'b1;
    @(posedge clk) #100;
    nv_load  = 1'b0;
    // normal operation: 6 long-term samples
    repeat (6 * 16 * 2 * SAMPLES) @(posedge clk);
    checks++;
    if (failing || n_exceed != 0) begin
      failures++;
      $display("flagged before the slowdown");
    end
    checks++;
    if (int'(trix) != 37 * int'(UNIT)) begin
      failures++;
      $display("trix %0d expected %0d", trix, 37 * UNIT);
    end
    checks++;
    if (count <= 16'd5000 || n_update == 0) begin
      failures++;
      $display("long-term average not updated: count %0d", count);
    end
    // wearout: 400 ps slower
    arrival = 1650;
    t_step = cycle;
    while (!failing && cycle - t_step < 1_500_000) @(posedge clk);
    t_flag = cycle;
    checks++;
    if (!failing) begin
      failures++;
      $display("slowdown not flagged");
    end
    $display("snapshots %0d, long-term updates %0d, excursions %0d, flagged %0d cycles after the slowdown",
             n_sums, n_update, n_exceed, t_flag - t_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
