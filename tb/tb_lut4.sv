`timescale 1ps/1ps
// tb_lut4: checks the 4-input LUT against a direct table read. The cell
// numbering is checked with the worked example of the LUT structure: pins
// (A,B,C,D) = (0,1,1,0) must read the seventh cell. Then random contents are
// read at every pin combination, and the six ring-oscillator functions are
// checked against their Boolean formulas.
module tb_lut4;
  import ro_pkg::*;
  logic [15:0] sram;
  logic [3:0]  pins;
  logic        out;
  int checks = 0, failures = 0;

  lut4 dut (.sram(sram), .pins(pins), .out(out));

  task automatic check(input logic exp, input string what);
    #10;
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: sram=%h pins(DCBA)=%b out=%b exp=%b", what, sram, pins, out, exp);
    end
  endtask

  function automatic logic formula(ro_type_e t, logic [3:0] p);
    logic a, b, c, d;
    {d, c, b, a} = p;
    unique case (t)
      RO_1, RO_3: return !(a | b | c | d);
      RO_2, RO_5: return !(a & b & c & d);
      RO_4:       return !a | b | c | d;
      RO_6:       return !a & b & c & d;
      default:    return 1'b0;
    endcase
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: only the seventh cell holds a 1 (cells counted from 1).
    sram = 16'b0000_0000_0100_0000;
    pins = 4'b0110;           // D=0 C=1 B=1 A=0
    check(1'b1, "seventh cell");
    sram = ~sram;
    check(1'b0, "seventh cell inverted");
    // One-hot walk: each cell reached by exactly its own address.
    for (int c = 0; c < 16; c++) begin
      sram = 16'(1) << c;
      for (int p = 0; p < 16; p++) begin
        pins = 4'(p);
        check(p == c, "one-hot");
      end
    end
    // Random contents.
    repeat (20) begin
      sram = 16'($urandom);
      for (int p = 0; p < 16; p++) begin
        pins = 4'(p);
        check(sram[p], "random");
      end
    end
    // Oscillator functions.
    for (int t = 0; t < NUM_RO_TYPES; t++) begin
      sram = ro_config(ro_type_e'(t)).init;
      for (int p = 0; p < 16; p++) begin
        pins = 4'(p);
        check(formula(ro_type_e'(t), 4'(p)), "function");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
