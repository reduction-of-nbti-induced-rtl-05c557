`timescale 1ps/1ps
// ring_oscillator: NBTI-tolerant ring oscillator made of FPGA look-up tables.
//
// NUM_LUTS LUTs (odd) form a ring: the output of LUT k drives the
// oscillation pin of LUT k+1 and the last output (f_out) drives the
// oscillation pin of the first LUT. The three other pins of every LUT are
// control pins, driven from one ro_mode_mux. In oscillation mode the control
// values make each LUT an inverter of its oscillation pin and the ring
// oscillates with period 2 * NUM_LUTS * stage delay. In sleep mode the
// control values force every LUT output to the variant's sleep level, which
// equals the value the oscillation pin then sees, so the ring rests with
// chosen selector gates at 1 (PMOS off). For RO_4, the main variant, all four
// pins of every LUT rest at 1.
//
// The LUT contents and pin values come from ro_pkg::ro_config(RO_TYPE). The
// ring is a deliberate combinational loop: it is the oscillator. It is broken
// in simulation only by the lut_delay models behind each LUT, which stand for
// the LUT and routing delay of the device.
//
// Wake-up: when all LUTs leave sleep at the same instant, every stage would
// invert together and the ring would run in a fast, all-stages-toggling
// mode. On silicon mismatch collapses that mode at once; here the control
// bus reaches LUT k after k * CTRL_SKEW_PS (the bus runs along the chain), so
// LUT 0 switches first, the even-numbered glitches are swallowed by the
// inertial stage delay and a single edge goes round the ring. CTRL_SKEW_PS
// must be well below STAGE_DELAY_PS. The ring must have spent at least
// NUM_LUTS stage delays in sleep mode before it is woken.
//
// Interface: mode (MODE_OSC / MODE_SLEEP, asynchronous), f_out (oscillator
// output), taps (all LUT outputs, taps[NUM_LUTS-1] == f_out), ctrl_pins (the
// control values leaving the mode mux, for observation).
//
// Parameters: NUM_LUTS = 11 follows the placement of the published design;
// the stage delay defaults to the value that reproduces the measured initial
// frequency of the variant. CTRL_SKEW_PS is this model's own.
module ring_oscillator
  import ro_pkg::*;
#(
  parameter ro_type_e    RO_TYPE        = RO_4,
  parameter int unsigned NUM_LUTS       = 11,
  parameter int unsigned STAGE_DELAY_PS = nominal_stage_delay_ps(RO_TYPE, NUM_LUTS),
  parameter int unsigned CTRL_SKEW_PS   = 20
) (
  input  ro_mode_e              mode,
  output logic                  f_out,
  output logic [NUM_LUTS-1:0]   taps,
  output logic [LUT_PINS-1:0]   ctrl_pins
);

  localparam ro_cfg_t CFG = ro_config(RO_TYPE);

  if (NUM_LUTS % 2 == 0 || NUM_LUTS < 3 || NUM_LUTS > 14) begin : g_bad_size
    $error("ring_oscillator: NUM_LUTS must be odd, at least 3 and fit one LAB with two LEs spare");
  end
  if (CTRL_SKEW_PS >= STAGE_DELAY_PS) begin : g_bad_skew
    $error("ring_oscillator: CTRL_SKEW_PS must be below STAGE_DELAY_PS");
  end

  ro_mode_mux u_mode_mux (
    .mode       (mode),
    .osc_ctrl   (CFG.osc_ctrl),
    .sleep_ctrl (CFG.sleep_ctrl),
    .ctrl       (ctrl_pins)
  );

  logic [LUT_PINS-1:0] ctrl_at [NUM_LUTS];  // control bus as seen by each LUT
  logic [NUM_LUTS-1:0] lut_out;

  assign ctrl_at[0] = ctrl_pins;

  for (genvar k = 0; k < NUM_LUTS; k++) begin : g_stage
    logic                ring_in;
    logic [LUT_PINS-1:0] pins;

    if (k > 0) begin : g_bus
      lut_delay #(.WIDTH(LUT_PINS), .DELAY_PS(CTRL_SKEW_PS)) u_bus_delay (
        .a (ctrl_at[k-1]),
        .y (ctrl_at[k])
      );
    end

    assign ring_in = taps[(k + NUM_LUTS - 1) % NUM_LUTS];

    always_comb begin
      pins = ctrl_at[k];
      pins[CFG.osc_pin] = ring_in;
    end

    lut4 u_lut (
      .sram (CFG.init),
      .pins (pins),
      .out  (lut_out[k])
    );

    lut_delay #(.WIDTH(1), .DELAY_PS(STAGE_DELAY_PS)) u_stage_delay (
      .a (lut_out[k]),
      .y (taps[k])
    );
  end

  assign f_out = taps[NUM_LUTS-1];

endmodule
