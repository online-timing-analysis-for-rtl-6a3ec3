// wdu_long_term_tb: runs two copies of Stage 3 on the same TRIX stream and
// compares each with a reference model kept in 64-bit integers.
//   A: default sizes (22-bit TRIX, 16-bit counter, one value in 16 taken,
//      4 consecutive excursions to fail);
//   B: 3-bit counter, every value taken, 2 excursions to fail, so that the
//      counter saturates and the flag trips early.
// The stream has a noisy level, then isolated dips beyond the threshold,
// then a restore of saved state through nv_load, then a lasting dip. After
// every TRIX value AVG, COUNT, failing, the number of exceed and save_req
// pulses are compared, and the time an average update takes is checked
// (TRIX_W + 2 clocks from the accepting edge).
module wdu_long_term_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TRIX_W = 22;

  class lt_model;
    int unsigned cw, interval, persist;
    int unsigned pos = 0;
    longint avg = 0, cnt = 0;
    int unsigned run = 0;
    bit failing = 0;
    int n_exceed = 0, n_save = 0;

    function new(int unsigned cw_i, int unsigned interval_i, int unsigned persist_i);
      cw = cw_i; interval = interval_i; persist = persist_i;
    endfunction

    // returns 1 when the value starts an average update
    function bit step(longint t, longint thr);
      bit take = (pos == 0);
      step = 0;
      pos = (pos + 1) % interval;
      if (!take) return 0;
      if (cnt == 0) begin
        avg = t; cnt = 1; n_save++;
      end else if (avg - t > thr) begin
        n_exceed++;
        if (run + 1 >= persist) failing = 1;
        if (run < persist) run++;
      end else begin
        run = 0;
        avg = avg + (t - avg) / (cnt + 1);   // truncates toward zero
        if (cnt < (longint'(1) << cw) - 1) cnt++;
        n_save++;
        step = 1;
      end
    endfunction

    function void load(longint a, longint c);
      avg = a; cnt = c; run = 0;
    endfunction
  endclass

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [TRIX_W-1:0] trix = '0, threshold = '0, nv_avg = '0;
  logic              trix_valid = 1'b0, nv_load = 1'b0;
  logic [15:0]       nv_count_a = '0;
  logic [2:0]        nv_count_b = '0;

  logic [TRIX_W-1:0] avg_a, avg_b;
  logic [15:0]       count_a;
  logic [2:0]        count_b;
  logic              failing_a, failing_b, exceed_a, exceed_b, save_a, save_b, busy_a, busy_b;

  wdu_long_term #(.TRIX_W(TRIX_W)) dut_a (
    .clk, .rst_n, .trix, .trix_valid, .threshold, .nv_load, .nv_avg,
    .nv_count(nv_count_a), .avg(avg_a), .count(count_a), .failing(failing_a),
    .exceed(exceed_a), .save_req(save_a), .busy(busy_a));

  wdu_long_term #(.TRIX_W(TRIX_W), .COUNT_W(3), .LT_INTERVAL(1), .PERSIST(2)) dut_b (
    .clk, .rst_n, .trix, .trix_valid, .threshold, .nv_load, .nv_avg,
    .nv_count(nv_count_b), .avg(avg_b), .count(count_b), .failing(failing_b),
    .exceed(exceed_b), .save_req(save_b), .busy(busy_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_exceed_a = 0, n_exceed_b = 0, n_save_a = 0, n_save_b = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      // outputs are not yet reset at the first edge
    end else begin
    if (exceed_a) n_exceed_a++;
    if (exceed_b) n_exceed_b++;
    if (save_a)   n_save_a++;
    if (save_b)   n_save_b++;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lt_model ma, mb;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic send(longint t);
    bit upd_a;
    int lat;
    @(negedge clk);
    trix = TRIX_W'(t);
    trix_valid = 1'b1;
    upd_a = ma.step(t, longint'(threshold));
    void'(mb.step(t, longint'(threshold)));
    @(negedge clk);
    trix_valid = 1'b0;
    if (upd_a) begin
      lat = 1;
      while (!save_a && lat < 40) begin
        @(negedge clk);
        lat++;
      end
      // lat counts the accepting edge too: TRIX_W + 2 edges after it
      check("A update latency", lat, TRIX_W + 3);
    end
    repeat (30) @(negedge clk);
    check("A avg", avg_a, ma.avg);
    check("A count", count_a, ma.cnt);
    check("A failing", failing_a, ma.failing);
    check("A exceed pulses", n_exceed_a, ma.n_exceed);
    check("A save pulses", n_save_a, ma.n_save);
    check("B avg", avg_b, mb.avg);
    check("B count", count_b, mb.cnt);
    check("B failing", failing_b, mb.failing);
    check("B exceed pulses", n_exceed_b, mb.n_exceed);
    check("B save pulses", n_save_b, mb.n_save);
  endtask

  function automatic longint noisy(longint level);
    return level + longint'($urandom % 4001) - 2000;
  endfunction

  initial begin
    bit early_exceed_a, sat_b;
    early_exceed_a = 0;
    sat_b = 0;
    ma = new(16, 16, 4);
    mb = new(3, 1, 2);
    threshold = TRIX_W'(5000);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1: steady level
    repeat (64) begin
      send(noisy(100000));
      if (mb.cnt == 7) sat_b = 1;
    end
    // 2: isolated dips beyond the threshold
    for (int n = 0; n < 400; n++) begin
      send(($urandom % 6 == 0) ? noisy(90000) : noisy(100000));
    end
    early_exceed_a = (ma.n_exceed > 0) && !ma.failing;
    check("A had excursions without failing", early_exceed_a, 1);
    // 3: restore a saved long history
    @(negedge clk);
    nv_avg     = TRIX_W'(200000);
    nv_count_a = 16'd1000;
    nv_count_b = 3'd5;
    nv_load    = 1'b1;
    ma.load(200000, 1000);
    mb.load(200000, 5);
    @(negedge clk);
    nv_load = 1'b0;
    check("A restored avg", avg_a, 200000);
    check("A restored count", count_a, 1000);
    repeat (32) send(noisy(200000));
    // 4: lasting shift to less slack
    repeat (16 * 6) send(noisy(180000));
    check("A failing at end", failing_a, 1);
    check("B failing at end", failing_b, 1);
    check("B counter saturated", sat_b, 1);
    $display("exceed A %0d B %0d, saves A %0d B %0d", n_exceed_a, n_exceed_b, n_save_a, n_save_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
