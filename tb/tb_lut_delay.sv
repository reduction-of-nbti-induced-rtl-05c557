`timescale 1ps/1ps
// tb_lut_delay: the delay model must delay an edge by exactly DELAY_PS and
// swallow a pulse shorter than DELAY_PS (inertial delay).
module tb_lut_delay;
  localparam int unsigned D = 300;
  logic a, y;
  int checks = 0, failures = 0;
  longint t_in, t_out;
  int edges;

  lut_delay #(.WIDTH(1), .DELAY_PS(D)) dut (.a(a), .y(y));

  always @(y) begin
    edges++;
    t_out = $time;
  end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (y=%b, t_out=%0d, edges=%0d)", what, $time, y, t_out, edges);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #2000;
    expect_true(y == 1'b0, "settles to input");
    for (int w = 50; w <= 650; w += 100) begin
      edges = 0;
      t_in = $time;
      a = 1'b1;
      #(w);
      a = 1'b0;
      #2000;
      if (w < D) begin
        expect_true(edges == 0, "short pulse swallowed");
      end else begin
        expect_true(edges == 2, "long pulse passed");
        expect_true(t_out == t_in + longint'(w) + longint'(D), "falling edge delayed by D");
      end
      expect_true(y == 1'b0, "rests at input");
    end
    // Single edge timing.
    edges = 0;
    t_in = $time;
    a = 1'b1;
    #(D - 1);
    expect_true(y == 1'b0, "not yet at D-1");
    #1;
    expect_true(y == 1'b1, "edge at D");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
