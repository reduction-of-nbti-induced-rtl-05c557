`timescale 1ps/1ps
// tb_ro_aging_monitor_full: the oscillator bank at its default parameters
// (two locations of RO_1..RO_6, 11 LUTs, 16-bit counter, 50 MHz clock, 85 us
// window, one-minute period) through one complete sweep after reset. Each of
// the 12 reported counts must equal the variant's measured initial frequency
// times 85 us, to 0.5 % + 2, with no overflow, in index order.
module tb_ro_aging_monitor_full;
  localparam int NUM_RO = 12;
  localparam int FREQ_KHZ [6] = '{168_000, 156_000, 91_000, 90_000, 87_000, 95_000};

  logic              clk = 0, rst_n;
  logic              result_valid, result_overflow, sweep_done;
  logic [3:0]        result_idx;
  logic [15:0]       result_count;
  logic [15:0]       last_count [NUM_RO];
  logic [NUM_RO-1:0] last_overflow, osc_active;

  int checks = 0, failures = 0, n_results = 0;
  bit done = 0;

  ro_aging_monitor dut (
    .clk, .rst_n, .result_valid, .result_idx, .result_count, .result_overflow,
    .sweep_done, .last_count, .last_overflow, .osc_active
  );

  always #10_000 clk = ~clk;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && result_valid) begin
      int exp_n, tol;
      exp_n = FREQ_KHZ[result_idx % 6] * 85 / 1000;
      tol   = exp_n / 200 + 2;
      expect_true(int'(result_idx) == n_results, "result order");
      expect_true(!result_overflow, "no overflow");
      expect_true(int'(result_count) >= exp_n - tol && int'(result_count) <= exp_n + tol,
                  $sformatf("ring %0d count %0d, expected %0d", result_idx, result_count, exp_n));
      $display("ring %0d (RO_%0d, location %0d): count %0d -> %0d kHz",
               result_idx, result_idx % 6 + 1, result_idx / 6, result_count,
               int'(result_count) * 1000 / 85);
      n_results <= n_results + 1;
    end
    if (rst_n && sweep_done) done <= 1;
  end

  initial begin : watchdog
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wait (done);
    repeat (2) @(posedge clk);
    expect_true(n_results == NUM_RO, "one result per ring");
    expect_true(osc_active == '0, "all rings asleep after the sweep");
    for (int i = 0; i < NUM_RO; i++)
      expect_true(last_count[i] != '0 && !last_overflow[i], $sformatf("stored result %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
