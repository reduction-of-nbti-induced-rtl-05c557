`timescale 1ps/1ps
// tb_ro_aging_monitor: end-to-end run of the oscillator bank with two
// locations of RO_1..RO_6 (12 rings, 11 LUTs each, 50 MHz clock, 85 us
// window) over two sweeps. Reduced against the defaults: the period is
// 1.5 ms instead of one minute, so the second sweep is started by the period
// timer, and the counter is 13 bits, so the two fastest variants saturate.
//
// Expected counts are worked out here from the measured initial frequencies
// of the variants: count = f * 85 us, to 0.5 % + 2. Mechanisms counted, each
// of which must occur: oscillation windows (every ring woken once per
// sweep, one ring at a time), returns to sleep, sweeps started by the
// period timer, saturated counts and unsaturated counts.
module tb_ro_aging_monitor;
  localparam int NUM_LOC = 2, NUM_RO = 12, CNT_W = 13, PERIOD_US = 1500;
  localparam int CLK_PS = 20_000;                        // 50 MHz
  localparam int PERIOD_CYC = PERIOD_US * 50;
  localparam int FREQ_KHZ [6] = '{168_000, 156_000, 91_000, 90_000, 87_000, 95_000};

  logic              clk = 0, rst_n;
  logic              result_valid, result_overflow, sweep_done;
  logic [3:0]        result_idx;
  logic [CNT_W-1:0]  result_count;
  logic [CNT_W-1:0]  last_count [NUM_RO];
  logic [NUM_RO-1:0] last_overflow, osc_active, prev_active;

  int checks = 0, failures = 0;
  int cycle = 0, sweeps = 0, timer_sweeps = 0, sweep_start = -1;
  int wakes [NUM_RO];
  int sleeps = 0, n_overflow = 0, n_plain = 0;
  bit prev_busy = 0;

  ro_aging_monitor #(.NUM_LOC(NUM_LOC), .CNT_W(CNT_W), .PERIOD_US(PERIOD_US)) dut (
    .clk, .rst_n, .result_valid, .result_idx, .result_count, .result_overflow,
    .sweep_done, .last_count, .last_overflow, .osc_active
  );

  always #(CLK_PS / 2) clk = ~clk;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      prev_active <= osc_active;
      expect_true($countones(osc_active) <= 1, "one ring at a time");
      for (int i = 0; i < NUM_RO; i++) begin
        if (osc_active[i] && !prev_active[i]) begin
          wakes[i] <= wakes[i] + 1;
          if (sweep_start < 0 || (i == 0)) begin
            if (sweep_start >= 0) begin
              expect_true(cycle - sweep_start == PERIOD_CYC + 0,
                          $sformatf("sweep interval %0d cycles", cycle - sweep_start));
              timer_sweeps <= timer_sweeps + 1;
            end
            sweep_start <= cycle;
          end
        end
        if (!osc_active[i] && prev_active[i]) sleeps <= sleeps + 1;
      end
      if (result_valid) begin
        int t, exp_n, tol;
        t = result_idx % 6;
        exp_n = FREQ_KHZ[t] * 85 / 1000;
        tol = exp_n / 200 + 2;
        if (exp_n > 2**CNT_W - 1) begin
          expect_true(result_overflow && result_count == '1,
                      $sformatf("ring %0d saturates (count %0d)", result_idx, result_count));
          n_overflow <= n_overflow + 1;
        end else begin
          expect_true(!result_overflow, $sformatf("ring %0d no overflow", result_idx));
          expect_true(int'(result_count) >= exp_n - tol && int'(result_count) <= exp_n + tol,
                      $sformatf("ring %0d count %0d, expected %0d", result_idx, result_count, exp_n));
          n_plain <= n_plain + 1;
        end
      end
      if (sweep_done) sweeps <= sweeps + 1;
    end
  end

  initial begin : watchdog
    #4_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_RO; i++) wakes[i] = 0;
    prev_active = '0;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wait (sweeps == 2);
    repeat (3) @(posedge clk);
    // Stored results: every ring has its latest count.
    for (int i = 0; i < NUM_RO; i++) begin
      int exp_n;
      exp_n = FREQ_KHZ[i % 6] * 85 / 1000;
      expect_true(last_overflow[i] == (exp_n > 2**CNT_W - 1), $sformatf("stored overflow %0d", i));
      if (exp_n <= 2**CNT_W - 1)
        expect_true(int'(last_count[i]) >= exp_n - exp_n / 200 - 2 &&
                    int'(last_count[i]) <= exp_n + exp_n / 200 + 2,
                    $sformatf("stored count %0d = %0d", i, last_count[i]));
      expect_true(wakes[i] == 2, $sformatf("ring %0d woken %0d times", i, wakes[i]));
    end
    expect_true(sleeps == 2 * NUM_RO, $sformatf("returns to sleep %0d", sleeps));
    expect_true(timer_sweeps == 1, "sweep started by the period timer");
    expect_true(n_overflow == 2 * 2 * NUM_LOC, $sformatf("saturated counts %0d", n_overflow));
    expect_true(n_plain == 2 * 4 * NUM_LOC, $sformatf("unsaturated counts %0d", n_plain));
    $display("mechanisms: wakes/ring=%0d sleeps=%0d timer sweeps=%0d saturated=%0d plain=%0d",
             wakes[0], sleeps, timer_sweeps, n_overflow, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
