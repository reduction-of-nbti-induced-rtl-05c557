`timescale 1ps/1ps
// tb_ro_aging_monitor_82us: the bank at one location with an 82 us
// oscillation window instead of 85 us (the short-window variant of the
// once-a-minute measurement). One sweep; each of the six counts must equal
// the variant's nominal frequency times 82 us, to 0.5 % + 2, and the window
// must last exactly 4100 cycles of the 50 MHz clock.
module tb_ro_aging_monitor_82us;
  localparam int NUM_RO = 6, WINDOW_NS = 82_000, WINDOW_CYC = 4100;
  localparam int FREQ_KHZ [6] = '{168_000, 156_000, 91_000, 90_000, 87_000, 95_000};

  logic              clk = 0, rst_n;
  logic              result_valid, result_overflow, sweep_done;
  logic [2:0]        result_idx;
  logic [15:0]       result_count;
  logic [15:0]       last_count [NUM_RO];
  logic [NUM_RO-1:0] last_overflow, osc_active;

  int checks = 0, failures = 0, n_results = 0, run_len = 0;
  bit done = 0;

  ro_aging_monitor #(.NUM_LOC(1), .WINDOW_NS(WINDOW_NS)) dut (
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
    if (rst_n) begin
      if (osc_active != '0) run_len <= run_len + 1;
      if (result_valid) begin
        int exp_n, tol;
        exp_n = FREQ_KHZ[result_idx] * 82 / 1000;
        tol   = exp_n / 200 + 2;
        expect_true(run_len == WINDOW_CYC, $sformatf("window %0d cycles", run_len));
        expect_true(!result_overflow, "no overflow");
        expect_true(int'(result_count) >= exp_n - tol && int'(result_count) <= exp_n + tol,
                    $sformatf("ring %0d count %0d, expected %0d", result_idx, result_count, exp_n));
        run_len <= 0;
        n_results <= n_results + 1;
      end
      if (sweep_done) done <= 1;
    end
  end

  initial begin : watchdog
    #2_000_000_000;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
