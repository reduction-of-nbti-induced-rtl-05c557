`timescale 1ps/1ps
// ro_pkg: types and constants shared by the ring-oscillator sensor.
//
// A ring oscillator here is a chain of 4-input LUTs. In oscillation mode every
// LUT acts as an inverter of one "oscillation pin" (A or D); the other three
// pins are control pins held at fixed values. In sleep mode the control pins
// are switched to a second set of values that forces every LUT output, and so
// the whole ring, to one stable level. Which selectors of the LUT mux tree are
// left conducting while asleep decides how much the oscillator ages, so six
// variants RO_1..RO_6 differ only in the LUT contents and the two sets of
// control-pin values.
//
// Pin numbering used throughout: bit 0 = pin A (first selector level, next to
// the configuration cells), bit 1 = B, bit 2 = C, bit 3 = D (last level, next
// to the output). LUT cell i (0-based) is read when {D,C,B,A} == i.
//
// The per-variant pin values and LUT functions follow the published
// ring-oscillator menu; the nominal initial frequencies are the measured ones
// of that menu and only serve to calibrate the delay model. Encodings of the
// enums are this design's own.
package ro_pkg;

  localparam int unsigned LUT_PINS  = 4;
  localparam int unsigned LUT_CELLS = 16;
  localparam int unsigned NUM_RO_TYPES = 6;

  typedef enum logic [2:0] {
    RO_1 = 3'd0,
    RO_2 = 3'd1,
    RO_3 = 3'd2,
    RO_4 = 3'd3,  // the structure proposed as the main example
    RO_5 = 3'd4,
    RO_6 = 3'd5
  } ro_type_e;

  typedef enum logic [1:0] {
    PIN_A = 2'd0,
    PIN_B = 2'd1,
    PIN_C = 2'd2,
    PIN_D = 2'd3
  } lut_pin_e;

  typedef enum logic {
    MODE_SLEEP = 1'b0,
    MODE_OSC   = 1'b1
  } ro_mode_e;

  // Everything that distinguishes one oscillator variant from another.
  typedef struct packed {
    lut_pin_e                 osc_pin;     // pin that closes the ring
    logic [LUT_PINS-1:0]      osc_ctrl;    // control-pin values, oscillation mode
    logic [LUT_PINS-1:0]      sleep_ctrl;  // control-pin values, sleep mode
    logic                     sleep_level; // level every LUT output rests at when asleep
    logic [LUT_CELLS-1:0]     init;        // LUT contents, bit i read at {D,C,B,A} == i
  } ro_cfg_t;

  // The bit of osc_ctrl / sleep_ctrl at osc_pin is unused (that pin is
  // driven by the previous LUT) and is kept 0.
  function automatic ro_cfg_t ro_config(ro_type_e t);
    ro_cfg_t c;
    unique case (t)
      // F = !A!B!C!D (NOR4), ring on D. Osc: A=B=C=0. Sleep: A=1 forces 0.
      RO_1: c = '{osc_pin: PIN_D, osc_ctrl: 4'b0000, sleep_ctrl: 4'b0001,
                  sleep_level: 1'b0, init: 16'h0001};
      // F = !(ABCD) (NAND4), ring on D. Osc: A=B=C=1. Sleep: A=0 forces 1.
      RO_2: c = '{osc_pin: PIN_D, osc_ctrl: 4'b0111, sleep_ctrl: 4'b0110,
                  sleep_level: 1'b1, init: 16'h7FFF};
      // F = !(A+B+C+D) (NOR4), ring on A. Osc: B=C=D=0. Sleep: B=1 forces 0.
      RO_3: c = '{osc_pin: PIN_A, osc_ctrl: 4'b0000, sleep_ctrl: 4'b0010,
                  sleep_level: 1'b0, init: 16'h0001};
      // F = !A+B+C+D, ring on A. Osc: B=C=D=0. Sleep: B=C=D=1 forces 1.
      RO_4: c = '{osc_pin: PIN_A, osc_ctrl: 4'b0000, sleep_ctrl: 4'b1110,
                  sleep_level: 1'b1, init: 16'hFFFD};
      // F = !(ABCD) (NAND4), ring on A. Osc: B=C=D=1. Sleep: B=0 forces 1.
      RO_5: c = '{osc_pin: PIN_A, osc_ctrl: 4'b1110, sleep_ctrl: 4'b1100,
                  sleep_level: 1'b1, init: 16'h7FFF};
      // F = !A.B.C.D, ring on A. Osc: B=C=D=1. Sleep: B=C=D=0 forces 0.
      RO_6: c = '{osc_pin: PIN_A, osc_ctrl: 4'b1110, sleep_ctrl: 4'b0000,
                  sleep_level: 1'b0, init: 16'h4000};
      default: c = '{osc_pin: PIN_A, osc_ctrl: 4'b0000, sleep_ctrl: 4'b1110,
                  sleep_level: 1'b1, init: 16'hFFFD};
    endcase
    return c;
  endfunction

  // Measured initial frequency of each variant in kHz (11-LUT rings).
  function automatic int unsigned initial_freq_khz(ro_type_e t);
    unique case (t)
      RO_1:    return 168_000;
      RO_2:    return 156_000;
      RO_3:    return 91_000;
      RO_4:    return 90_000;
      RO_5:    return 87_000;
      RO_6:    return 95_000;
      default: return 90_000;
    endcase
  endfunction

  // Delay of one stage (LUT plus local route) in ps that gives a ring of
  // n_luts stages its nominal frequency: period = 2 * n_luts * delay.
  // Rounded to the nearest ps.
  function automatic int unsigned nominal_stage_delay_ps(ro_type_e t, int unsigned n_luts);
    longint unsigned den;
    den = 64'd2 * n_luts * initial_freq_khz(t);
    return int'((64'd1_000_000_000 + den / 2) / den);
  endfunction

endpackage
