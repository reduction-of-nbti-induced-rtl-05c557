`timescale 1ps/1ps
// tb_lut_selector: exhaustive check of the 2:1 LUT selector. Pin at 1 must
// pass in1 (NMOS branch), pin at 0 must pass in0 (PMOS branch).
module tb_lut_selector;
  logic sel, in0, in1, y;
  int checks = 0, failures = 0;

  lut_selector dut (.sel(sel), .in0(in0), .in1(in1), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #10;
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%b in0=%b in1=%b y=%b", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
