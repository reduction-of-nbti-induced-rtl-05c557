`timescale 1ps/1ps
// tb_ring_oscillator: runs one ring of every variant RO_1..RO_6 (11 LUTs,
// default stage delays) through sleep / oscillation cycles.
//
// The expected values are written out here from the published oscillator
// menu, not taken from ro_pkg: per pin A..D the selector type that conducts
// in each mode (P: pin at 0, PMOS on; N: pin at 1, NMOS on; O: oscillation
// pin, both in turn), the number of PMOS / NMOS selectors that conduct in
// both modes ("# of degrade"), and the measured initial frequency.
// Checked for each variant:
//   - in sleep, every LUT output rests at the level its oscillation pin
//     must hold, and the control pins carry the sleep values;
//   - in oscillation, the control pins carry the oscillation values;
//   - the degrade counts derived from the observed pin values;
//   - the oscillation period (2 * 11 * stage delay) against the measured
//     frequency, to 0.5 %, and that every period has the same length (a
//     single edge goes round the ring, no fast multi-edge mode);
//   - all of this again after each of three wake-ups.
module tb_ring_oscillator;
  import ro_pkg::*;

  localparam int N = 11;
  localparam int T = 6;

  // Per variant: pin letters A,B,C,D for oscillation and sleep mode.
  localparam string OSC_PAT   [T] = '{"PPPO", "NNNO", "OPPP", "OPPP", "ONNN", "ONNN"};
  localparam string SLEEP_PAT [T] = '{"NPPP", "PNNN", "PNPP", "NNNN", "NPNN", "PPPP"};
  localparam int    DEG_P     [T] = '{3, 0, 3, 0, 0, 1};
  localparam int    DEG_N     [T] = '{0, 3, 0, 1, 3, 0};
  localparam int    FREQ_MHZ  [T] = '{168, 156, 91, 90, 87, 95};

  ro_mode_e         mode;
  logic [T-1:0]     f_out;
  logic [N-1:0]     taps  [T];
  logic [3:0]       ctrl  [T];
  logic [3:0]       osc_seen [T];

  int checks = 0, failures = 0;
  bit measuring = 0;
  longint first_t [T], last_t [T], min_iv [T], max_iv [T];
  int     n_edges [T];

  for (genvar t = 0; t < T; t++) begin : g_ring
    ring_oscillator #(.RO_TYPE(ro_type_e'(t)), .NUM_LUTS(N)) dut (
      .mode      (mode),
      .f_out     (f_out[t]),
      .taps      (taps[t]),
      .ctrl_pins (ctrl[t])
    );
    always @(posedge f_out[t]) begin
      if (measuring) begin
        if (n_edges[t] == 0) begin
          first_t[t] = $time;
        end else begin
          if ($time - last_t[t] < min_iv[t]) min_iv[t] = $time - last_t[t];
          if ($time - last_t[t] > max_iv[t]) max_iv[t] = $time - last_t[t];
        end
        last_t[t] = $time;
        n_edges[t]++;
      end
    end
  end

  function automatic int osc_pin_of(int t);
    for (int p = 0; p < 4; p++) if (OSC_PAT[t][p] == "O") return p;
    return -1;
  endfunction

  task automatic expect_true(input bit ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL RO_%0d: %s at %0t", t + 1, what, $time);
    end
  endtask

  task automatic check_sleep(input int t);
    int   op;
    logic lvl;
    op  = osc_pin_of(t);
    lvl = (SLEEP_PAT[t][op] == "N");
    expect_true(taps[t] == {N{lvl}}, "sleep level of all LUT outputs", t);
    for (int p = 0; p < 4; p++)
      if (p != op)
        expect_true(ctrl[t][p] == (SLEEP_PAT[t][p] == "N"), "sleep control pin", t);
  endtask

  task automatic check_degrade(input int t);
    int op, np, nn;
    op = osc_pin_of(t);
    np = 0;
    nn = 0;
    for (int p = 0; p < 4; p++) begin
      logic s = (p == op) ? taps[t][N-1] : ctrl[t][p];   // pin value while asleep
      bit osc_p = (p == op) || (osc_seen[t][p] == 1'b0);
      bit osc_n = (p == op) || (osc_seen[t][p] == 1'b1);
      if (s == 1'b0 && osc_p) np++;
      if (s == 1'b1 && osc_n) nn++;
    end
    expect_true(np == DEG_P[t], $sformatf("PMOS degrade count %0d", np), t);
    expect_true(nn == DEG_N[t], $sformatf("NMOS degrade count %0d", nn), t);
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_SLEEP;
    #20_000;
    for (int t = 0; t < T; t++) check_sleep(t);
    for (int round = 0; round < 3; round++) begin
      for (int t = 0; t < T; t++) begin
        n_edges[t] = 0;
        min_iv[t]  = 64'h7fff_ffff;
        max_iv[t]  = 0;
      end
      mode = MODE_OSC;
      #2_000;
      for (int t = 0; t < T; t++) begin
        int op;
        op = osc_pin_of(t);
        osc_seen[t] = ctrl[t];
        for (int p = 0; p < 4; p++)
          if (p != op)
            expect_true(ctrl[t][p] == (OSC_PAT[t][p] == "N"), "oscillation control pin", t);
      end
      measuring = 1;
      #300_000;
      measuring = 0;
      for (int t = 0; t < T; t++) begin
        longint exp_period, avg;
        exp_period = 64'd1_000_000 / longint'(FREQ_MHZ[t]);
        expect_true(n_edges[t] > 20, $sformatf("oscillates (%0d edges)", n_edges[t]), t);
        if (n_edges[t] > 1) begin
          avg = (last_t[t] - first_t[t]) / longint'(n_edges[t] - 1);
          expect_true(avg * 1000 > exp_period * 995 && avg * 1000 < exp_period * 1005,
                      $sformatf("period %0d ps, expected %0d ps", avg, exp_period), t);
          expect_true(min_iv[t] == max_iv[t],
                      $sformatf("steady period (min %0d max %0d)", min_iv[t], max_iv[t]), t);
        end
      end
      mode = MODE_SLEEP;
      #20_000;
      for (int t = 0; t < T; t++) begin
        check_sleep(t);
        check_degrade(t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
