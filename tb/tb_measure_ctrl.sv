`timescale 1ps/1ps
// tb_measure_ctrl: runs the measurement scheduler with three oscillators, a
// 100 MHz clock, a 200 ns window (20 cycles) and a 2 us period (200 cycles).
// A counter model in the testbench counts the clock cycles during which the
// selected oscillator is enabled, scaled by a per-oscillator factor, so each
// reported count is known in advance. Checked: sweeps start at reset and
// then every period, oscillators run one at a time in index order, each
// exactly one window long, the counter is cleared before each window, the
// reported index / count / overflow match, and sweep_done closes each sweep.
module tb_measure_ctrl;
  localparam int NUM_RO = 3, CNT_W = 10, CLK_HZ = 100_000_000;
  localparam int WINDOW_NS = 200, PERIOD_US = 2;
  localparam int WINDOW_CYC = 20, PERIOD_CYC = 200;
  localparam int SCALE [NUM_RO] = '{3, 5, 60};   // counts per enabled cycle

  logic              clk = 0, rst_n;
  logic [NUM_RO-1:0] osc_en;
  logic [1:0]        sel, result_idx;
  logic              cnt_clr, result_valid, result_overflow, sweep_done, busy;
  logic [CNT_W-1:0]  count, result_count;
  logic              cnt_overflow;
  int                model_count;

  int checks = 0, failures = 0;
  int cycle = 0, run_len = 0, last_sweep_start = -1, sweeps = 0, results_in_sweep = 0;
  int expect_idx = 0, period_checks = 0;

  measure_ctrl #(
    .NUM_RO(NUM_RO), .CNT_W(CNT_W), .CLK_HZ(CLK_HZ),
    .WINDOW_NS(WINDOW_NS), .PERIOD_US(PERIOD_US)
  ) dut (
    .clk, .rst_n, .osc_en, .sel, .cnt_clr, .count, .cnt_overflow,
    .result_valid, .result_idx, .result_count, .result_overflow, .sweep_done, .busy
  );

  always #5000 clk = ~clk;

  // Counter model.
  always_ff @(posedge clk) begin
    if (cnt_clr) model_count <= 0;
    else if (osc_en[sel]) model_count <= model_count + SCALE[sel];
  end
  assign count        = (model_count > 2**CNT_W - 1) ? CNT_W'(2**CNT_W - 1) : CNT_W'(model_count);
  assign cnt_overflow = model_count > 2**CNT_W - 1;

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
      expect_true($countones(osc_en) <= 1, "one oscillator at a time");
      if (osc_en != '0) begin
        expect_true(osc_en == (NUM_RO'(1) << expect_idx), "oscillator order");
        expect_true(sel == 2'(expect_idx), "counter select follows oscillator");
        run_len <= run_len + 1;
      end
      if (busy && last_sweep_start < 0) last_sweep_start <= cycle;
      if (result_valid) begin
        int exp_n;
        exp_n = WINDOW_CYC * SCALE[expect_idx];
        expect_true(run_len == WINDOW_CYC, $sformatf("window of %0d cycles", run_len));
        expect_true(result_idx == 2'(expect_idx), "result index");
        expect_true(result_count == ((exp_n > 2**CNT_W - 1) ? CNT_W'(2**CNT_W - 1) : CNT_W'(exp_n)),
                    $sformatf("result count %0d", result_count));
        expect_true(result_overflow == (exp_n > 2**CNT_W - 1), "overflow flag");
        run_len <= 0;
        results_in_sweep <= results_in_sweep + 1;
        expect_idx <= (expect_idx + 1) % NUM_RO;
      end
      if (sweep_done) begin
        expect_true(results_in_sweep == NUM_RO - 1 && result_valid, "sweep covers every oscillator");
        results_in_sweep <= 0;
        sweeps <= sweeps + 1;
      end
      if (busy && !$past(busy) && sweeps > 0) begin
        expect_true(cycle - last_sweep_start == PERIOD_CYC,
                    $sformatf("sweep period %0d cycles", cycle - last_sweep_start));
        last_sweep_start <= cycle;
        period_checks <= period_checks + 1;
      end
    end
  end

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (sweeps == 3);
    repeat (5) @(posedge clk);
    expect_true(!busy, "idle between sweeps");
    expect_true(period_checks == 2, "sweeps started by the period timer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
