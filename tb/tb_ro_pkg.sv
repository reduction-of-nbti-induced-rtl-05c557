`timescale 1ps/1ps
// tb_ro_pkg: checks the per-variant configuration table of ro_pkg against
// what a working ring needs, evaluating the LUT contents directly:
//   - in oscillation mode the LUT inverts its oscillation pin;
//   - in sleep mode the LUT output equals the sleep level whatever the
//     oscillation pin is, and the sleep level equals the value the
//     published menu gives the oscillation pin while asleep;
//   - the unused control bit at the oscillation pin is 0;
//   - the stage delay is 1e12 / (2 * 11 * f) ps for the measured initial
//     frequency f, rounded.
module tb_ro_pkg;
  import ro_pkg::*;
  localparam int T = 6;
  localparam int  OSC_PIN   [T] = '{3, 3, 0, 0, 0, 0};
  localparam bit  SLEEP_LVL [T] = '{0, 1, 0, 1, 1, 0};
  localparam int  DELAY_PS  [T] = '{271, 291, 500, 505, 522, 478};

  int checks = 0, failures = 0;

  task automatic expect_true(input bit ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL RO_%0d: %s", t + 1, what);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      ro_cfg_t c;
      c = ro_config(ro_type_e'(t));
      expect_true(int'(c.osc_pin) == OSC_PIN[t], "oscillation pin", t);
      expect_true(c.sleep_level == SLEEP_LVL[t], "sleep level", t);
      expect_true(c.osc_ctrl[c.osc_pin] == 1'b0 && c.sleep_ctrl[c.osc_pin] == 1'b0,
                  "unused control bit", t);
      for (int x = 0; x < 2; x++) begin
        logic [3:0] p;
        p = c.osc_ctrl;
        p[c.osc_pin] = 1'(x);
        expect_true(c.init[p] == !1'(x), $sformatf("inverts in oscillation mode (x=%0d)", x), t);
        p = c.sleep_ctrl;
        p[c.osc_pin] = 1'(x);
        expect_true(c.init[p] == SLEEP_LVL[t], $sformatf("forced in sleep mode (x=%0d)", x), t);
      end
      expect_true(nominal_stage_delay_ps(ro_type_e'(t), 11) == DELAY_PS[t],
                  $sformatf("stage delay %0d ps", nominal_stage_delay_ps(ro_type_e'(t), 11)), t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
