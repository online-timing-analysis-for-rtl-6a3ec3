// wdu_top_tb: end-to-end test of the wearout detection unit at reduced
// sampling sizes (16 values per snapshot, alpha = 1/4, one TRIX value in 2
// taken, 3 excursions to fail, 8-bit counter); the delay chain keeps its
// full 38 taps of 100 ps and the clock its 5 ns period.
//
// The monitored wire is driven a chosen time after each rising edge, as the
// output of a block whose delay is that time. The expected slack is the
// number of taps whose total delay still fits before the next edge,
// min(38, floor((5000 - arrival) / 100)) with arrivals off the 100 ps grid.
// Phases:
//   1 early arrival (1250 ps), wire sometimes held: slack and snapshot sums
//     checked exactly, history builds in Stage 3;
//   2 enable low for a while: no measurement may appear;
//   3 a short burst of late arrivals (a temperature spike): Stage 3 sees
//     excursions but must not flag the wire;
//   4 restore of a saved history through nv_load;
//   5 lasting wearout (arrival 1850 ps, 6 buffers less slack): the wire must
//     be flagged.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module wdu_top_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TAPS         = 38;
  localparam int unsigned SAMPLES      = 16;
  localparam int unsigned SAMPLE_EVERY = 2;
  localparam int unsigned ALPHA_SHIFT  = 2;
  localparam int unsigned LT_INTERVAL  = 2;
  localparam int unsigned COUNT_W      = 8;
  localparam int unsigned PERSIST      = 3;
  localparam int unsigned PERIOD       = 5000;
  localparam int unsigned LAT_W        = $clog2(TAPS + 1);
  localparam int unsigned SUM_W        = $clog2(TAPS * SAMPLES + 1);
  localparam int unsigned TRIX_W       = SUM_W + ALPHA_SHIFT;
  localparam int unsigned UNIT         = SAMPLES << ALPHA_SHIFT;  // one tap in TRIX units

  logic               clk = 1'b0, rst_n = 1'b0, enable = 1'b1, sig_in = 1'b0;
  logic [TRIX_W-1:0]  threshold = TRIX_W'(3 * UNIT);
  logic               nv_load = 1'b0;
  logic [TRIX_W-1:0]  nv_avg = '0;
  logic [COUNT_W-1:0] nv_count = '0;
  logic [LAT_W-1:0]   slack;
  logic               slack_valid;
  logic [SUM_W-1:0]   sum;
  logic               sum_valid;
  logic [TRIX_W-1:0]  trix;
  logic               trix_valid;
  logic [TRIX_W-1:0]  avg;
  logic [COUNT_W-1:0] count;
  logic               exceed, save_req, failing;

  wdu_top #(
    .TAPS(TAPS), .SAMPLES(SAMPLES), .SAMPLE_EVERY(SAMPLE_EVERY), .ALPHA_SHIFT(ALPHA_SHIFT),
    .LT_INTERVAL(LT_INTERVAL), .COUNT_W(COUNT_W), .PERSIST(PERSIST)
  ) dut (.*);

  always #(PERIOD / 2) clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus: the wire toggles `arrival` ps after an edge ----
  int unsigned arrival = 1250;
  int unsigned hold_pct = 0;     // percentage of cycles without a transition
  int unsigned launched_arrival = 1250;  // arrival of the latest transition
  int unsigned measured_arrival = 1250;  // arrival of the transition captured at the last edge

  initial begin
    int unsigned a;
    forever begin
      @(posedge clk);
      if (($urandom % 100) >= hold_pct) begin
        a = arrival;
        #(a);
        sig_in = ~sig_in;
        launched_arrival = a;
      end
    end
  end

  function automatic int exp_slack(int unsigned arr);
    int s = (int'(PERIOD) - int'(arr)) / 100;
    return (s > int'(TAPS)) ? int'(TAPS) : s;
  endfunction

  // ---- mechanism counters and checks on each stage ----
  int n_meas = 0, n_quiet = 0, n_taken = 0, n_sums = 0, n_trix = 0;
  int n_update = 0, n_exceed = 0, n_save = 0, n_restore = 0, n_disabled = 0;
  int ref_seen = 0, ref_sum = 0;
  logic prev_sig_q = 1'b0, sig_q = 1'b0;
  logic [COUNT_W-1:0] prev_count = '0;

  always @(posedge clk) begin
    // count the edges at which the wire had not changed since the last one
    prev_sig_q <= sig_q;
    sig_q      <= sig_in;
    measured_arrival <= launched_arrival;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // the snapshot holds the values accepted before the edge that ended it
      if (sum_valid) begin
        checks++;
        if (int'(sum) != ref_sum) begin
          failures++;
          $display("%0t sum %0d expected %0d", $time, sum, ref_sum);
        end
        ref_sum = 0;
      end
      if (slack_valid && !enable) begin
        failures++;
        $display("%0t measurement while disabled", $time);
      end
      if (slack_valid) begin
        n_meas++;
        checks++;
        if (int'(slack) != exp_slack(measured_arrival)) begin
          failures++;
          $display("%0t slack %0d expected %0d", $time, slack, exp_slack(measured_arrival));
        end
        if (ref_seen % SAMPLE_EVERY == 0) begin
          ref_sum += int'(slack);
          n_taken++;
        end
        ref_seen++;
      end else if (enable && sig_q == prev_sig_q) begin
        n_quiet++;
      end else if (!enable) begin
        n_disabled++;
      end
      if (sum_valid) begin
        n_sums++;
      end
      if (trix_valid) n_trix++;
      if (exceed)     n_exceed++;
      if (save_req) begin
        n_save++;
        if (count != prev_count) n_update++;
      end
      prev_count = count;
    end
  end

  task automatic run_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    int trix_before, spike_exceed;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    // 1: early arrival, some cycles held
    hold_pct = 20;
    run_cycles(1500);
    checks++;
    if (failing) begin failures++; $display("flagged during normal operation"); end
    // 2: unit switched off
    @(posedge clk) #100 enable = 1'b0;
    run_cycles(200);
    @(posedge clk) #100 enable = 1'b1;
    // 3: short spike of late arrivals
    hold_pct = 0;
    arrival = 1850;
    run_cycles(250);
    arrival = 1250;
    run_cycles(2000);
    checks++;
    if (failing) begin failures++; $display("flagged by a short spike"); end
    spike_exceed = n_exceed;
    checks++;
    if (spike_exceed == 0) begin failures++; $display("spike gave no excursion"); end
    // 4: restore a long history saved earlier
    @(posedge clk) #100;
    nv_avg   = TRIX_W'(exp_slack(1250) * int'(UNIT));
    nv_count = COUNT_W'(200);
    nv_load  = 1'b1;
    @(posedge clk) #100;
    nv_load  = 1'b0;
    n_restore++;
    checks++;
    if (count != COUNT_W'(200) || int'(avg) != exp_slack(1250) * int'(UNIT)) begin
      failures++;
      $display("restore failed: avg %0d count %0d", avg, count);
    end
    run_cycles(500);
    // 5: lasting wearout
    arrival = 1850;
    trix_before = int'(trix);
    run_cycles(3000);
    checks++;
    if (!failing) begin failures++; $display("wearout not flagged"); end
    // after the shift the TRIX must sit 6 taps lower
    checks++;
    if (int'(trix) != exp_slack(1850) * int'(UNIT)) begin
      failures++;
      $display("trix %0d expected %0d (was %0d)", trix, exp_slack(1850) * int'(UNIT), trix_before);
    end
    // mechanisms
    $display("measured %0d quiet %0d disabled %0d taken %0d sums %0d trix %0d updates %0d exceed %0d saves %0d restores %0d",
             n_meas, n_quiet, n_disabled, n_taken, n_sums, n_trix, n_update, n_exceed, n_save, n_restore);
    checks += 10;
    if (n_meas == 0)     begin failures++; $display("no measurement"); end
    if (n_quiet == 0)    begin failures++; $display("no cycle without transition"); end
    if (n_disabled == 0) begin failures++; $display("no disabled cycle"); end
    if (n_taken * 2 > n_meas + 1 || n_taken * 2 < n_meas - 1) begin failures++; $display("decimation off"); end
    if (n_sums == 0)     begin failures++; $display("no snapshot"); end
    if (n_trix == 0)     begin failures++; $display("no TRIX value"); end
    if (n_update == 0)   begin failures++; $display("no average update"); end
    if (n_exceed == 0)   begin failures++; $display("no excursion"); end
    if (n_save == 0)     begin failures++; $display("no save request"); end
    if (n_restore == 0)  begin failures++; $display("no restore"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
