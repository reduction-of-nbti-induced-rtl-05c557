`timescale 1ps/1ps
// ro_aging_monitor: bank of NBTI-tolerant ring oscillators with their
// measurement logic.
//
// The six oscillator variants RO_1..RO_6 are placed NUM_LOC times (two
// locations by default), giving NUM_LOC * 6 rings. Oscillator i is variant
// (i mod 6) at location (i / 6). All rings sleep except during their own
// measurement: measure_ctrl wakes them one at a time for the measurement
// window, the selected ring's output clocks the shared freq_counter, and the
// count is reported on result_* and kept in last_count[i]. The frequency of
// oscillator i in Hz is last_count[i] * 1e9 / WINDOW_NS. Tracking that value
// over time gives the aging of each variant.
//
// Interface: clk (system clock, CLK_HZ), rst_n (active-low synchronous
// reset); result_valid / result_idx / result_count / result_overflow (one
// report per measurement); sweep_done (pulse at the end of each sweep);
// last_count / last_overflow (latest result of every oscillator, 0 until
// measured); osc_active (the ring that is running, if any).
//
// cnt_clr is a register of the system clock that is used as the asynchronous
// clear of the oscillator-clocked counter. That is intended: it is raised and
// released only while the selected ring is asleep and meas_clk is still.
//
// Timing: one sweep takes NUM_RO * (CLEAR_CYC + window + SETTLE_CYC + 1)
// clock cycles, about 1 ms at the defaults, and repeats every PERIOD_US.
module ro_aging_monitor
  import ro_pkg::*;
#(
  parameter int unsigned NUM_LUTS     = 11,
  parameter int unsigned NUM_LOC      = 2,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned WINDOW_NS    = 85_000,
  parameter int unsigned PERIOD_US    = 60_000_000,
  parameter int unsigned CTRL_SKEW_PS = 20,
  localparam int unsigned NUM_RO      = NUM_RO_TYPES * NUM_LOC,
  localparam int unsigned IDX_W       = $clog2(NUM_RO)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                result_valid,
  output logic [IDX_W-1:0]    result_idx,
  output logic [CNT_W-1:0]    result_count,
  output logic                result_overflow,
  output logic                sweep_done,
  output logic [CNT_W-1:0]    last_count    [NUM_RO],
  output logic [NUM_RO-1:0]   last_overflow,
  output logic [NUM_RO-1:0]   osc_active
);

  logic [NUM_RO-1:0] osc_en;
  logic [NUM_RO-1:0] f_out;
  logic [IDX_W-1:0]  sel;
  logic              cnt_clr;
  logic              meas_clk;
  logic [CNT_W-1:0]  count;
  logic              cnt_overflow;

  for (genvar i = 0; i < NUM_RO; i++) begin : g_ro
    localparam ro_type_e TYPE = ro_type_e'(i % NUM_RO_TYPES);
    ring_oscillator #(
      .RO_TYPE      (TYPE),
      .NUM_LUTS     (NUM_LUTS),
      .CTRL_SKEW_PS (CTRL_SKEW_PS)
    ) u_ro (
      .mode      (osc_en[i] ? MODE_OSC : MODE_SLEEP),
      .f_out     (f_out[i]),
      .taps      (),
      .ctrl_pins ()
    );
  end

  // The select changes only while every ring sleeps and the counter is held
  // cleared, so a step on meas_clk at that moment is harmless.
  assign meas_clk = f_out[sel];

  freq_counter #(.WIDTH(CNT_W)) u_counter (
    .ro_clk   (meas_clk),
    .clr      (cnt_clr),
    .count    (count),
    .overflow (cnt_overflow)
  );

  measure_ctrl #(
    .NUM_RO    (NUM_RO),
    .CNT_W     (CNT_W),
    .CLK_HZ    (CLK_HZ),
    .WINDOW_NS (WINDOW_NS),
    .PERIOD_US (PERIOD_US)
  ) u_ctrl (
    .clk             (clk),
    .rst_n           (rst_n),
    .osc_en          (osc_en),
    .sel             (sel),
    .cnt_clr         (cnt_clr),
    .count           (count),
    .cnt_overflow    (cnt_overflow),
    .result_valid    (result_valid),
    .result_idx      (result_idx),
    .result_count    (result_count),
    .result_overflow (result_overflow),
    .sweep_done      (sweep_done),
    .busy            ()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_RO; i++) last_count[i] <= '0;
      last_overflow <= '0;
    end else if (result_valid) begin
      last_count[result_idx]    <= result_count;
      last_overflow[result_idx] <= result_overflow;
    end
  end

  assign osc_active = osc_en;

endmodule
