`timescale 1ps/1ps
// lut4: 4-input look-up table built as a tree of 2:1 selectors.
//
// Sixteen configuration cells feed a four-level selector tree. Pin A steers
// the eight selectors next to the cells, pin B the next four, C the next two
// and D the single selector at the output, so the output is
// sram[{D,C,B,A}]: for (A,B,C,D) = (0,1,1,0) the seventh cell (index 6) is
// read. Each selector is an instance of lut_selector; the tree is kept
// explicit (rather than a single indexed read) so that the selector at every
// level stays visible, as the aging analysis of the ring oscillator is done
// selector by selector.
//
// Interface: sram[15:0] holds the configuration cells (constant in use),
// pins[3:0] = {D,C,B,A}, out = selected cell. Combinational.
module lut4 (
  input  logic [15:0] sram,
  input  logic [3:0]  pins,
  output logic        out
);

  // All tree nodes in one vector: level 0 (the cells) is nodes[15:0], level 1
  // nodes[23:16], level 2 nodes[27:24], level 3 nodes[29:28], output nodes[30].
  // Level l starts at index 32 - (32 >> l).
  logic [30:0] nodes;

  assign nodes[15:0] = sram;

  for (genvar l = 0; l < 4; l++) begin : g_level
    localparam int unsigned BASE_IN  = 32 - (32 >> l);
    localparam int unsigned BASE_OUT = 32 - (32 >> (l + 1));
    for (genvar k = 0; k < (8 >> l); k++) begin : g_sel
      lut_selector u_sel (
        .sel (pins[l]),
        .in0 (nodes[BASE_IN + 2*k]),
        .in1 (nodes[BASE_IN + 2*k + 1]),
        .y   (nodes[BASE_OUT + k])
      );
    end
  end

  assign out = nodes[30];

endmodule
