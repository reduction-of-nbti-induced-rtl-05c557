`timescale 1ps/1ps
// tb_ro_mode_mux: the mode mux must pass the oscillation values in
// oscillation mode and the sleep values in sleep mode.
module tb_ro_mode_mux;
  import ro_pkg::*;
  ro_mode_e   mode;
  logic [3:0] osc_ctrl, sleep_ctrl, ctrl;
  int checks = 0, failures = 0;

  ro_mode_mux dut (.mode(mode), .osc_ctrl(osc_ctrl), .sleep_ctrl(sleep_ctrl), .ctrl(ctrl));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int s = 0; s < 16; s++) begin
        osc_ctrl = 4'(o);
        sleep_ctrl = 4'(s);
        mode = MODE_OSC;
        #10;
        checks++;
        if (ctrl !== 4'(o)) begin
          failures++;
          $display("FAIL osc: ctrl=%b exp=%b", ctrl, 4'(o));
        end
        mode = MODE_SLEEP;
        #10;
        checks++;
        if (ctrl !== 4'(s)) begin
          failures++;
          $display("FAIL sleep: ctrl=%b exp=%b", ctrl, 4'(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
