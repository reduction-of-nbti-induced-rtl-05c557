`timescale 1ps/1ps
// ro_mode_mux: mode selector on the control pins of a ring oscillator.
//
// One multiplexer picks between the control-pin values of the oscillation
// mode and those of the sleep mode and drives the result onto the control
// pins of every LUT of the ring. Switching the control pins, rather than
// gating the ring with an AND gate in one stage, is what lets the sleep state
// park every LUT of the ring with its PMOS selectors off.
//
// Interface: mode (MODE_OSC / MODE_SLEEP), osc_ctrl and sleep_ctrl (pin
// values, bit 0 = pin A .. bit 3 = pin D), ctrl (to the LUT pins).
// Combinational.
module ro_mode_mux
  import ro_pkg::*;
(
  input  ro_mode_e             mode,
  input  logic [LUT_PINS-1:0]  osc_ctrl,
  input  logic [LUT_PINS-1:0]  sleep_ctrl,
  output logic [LUT_PINS-1:0]  ctrl
);

  always_comb ctrl = (mode == MODE_OSC) ? osc_ctrl : sleep_ctrl;

endmodule
