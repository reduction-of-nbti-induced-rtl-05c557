`timescale 1ps/1ps
// lut_delay: behavioural model of the propagation delay of a LUT and its
// local route. Not synthesizable; on the FPGA this delay is physical.
//
// The output follows the input after DELAY_PS picoseconds. The delay is
// inertial: an input pulse shorter than DELAY_PS does not reach the output,
// as a real gate swallows a glitch narrower than its own delay. The ring
// oscillator relies on this when it wakes up (see ring_oscillator).
//
// Interface: a[WIDTH-1:0] in, y[WIDTH-1:0] out; the vector is delayed as a
// whole. Time unit 1 ps.
module lut_delay #(
  parameter int unsigned WIDTH    = 1,
  parameter int unsigned DELAY_PS = 505
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);

  assign #(DELAY_PS) y = a;

endmodule
