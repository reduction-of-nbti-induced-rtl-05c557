`timescale 1ps/1ps
// lut_selector: one 2:1 selector of a LUT's multiplexer tree.
//
// The selector is a complementary pass-transistor pair whose gates are driven
// by one LUT input pin. With the pin at 1 the NMOS conducts and passes input
// in1; with the pin at 0 the PMOS conducts and passes input in0. That the 0
// branch goes through a PMOS is what matters for aging: a pin resting at 0
// keeps a PMOS switched on (stressed), a pin resting at 1 keeps it off. A
// transmission-gate selector with a local inverter has the same logic
// function and would use this same module.
//
// Interface: sel (the pin), in0 / in1 (the two branches), y. Purely
// combinational, no clock.
module lut_selector (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic y
);

  always_comb y = sel ? in1 : in0;

endmodule
