`timescale 1ps/1ps
// tb_freq_counter: drives bursts of known numbers of edges into the counter
// and checks the count, the asynchronous clear and saturation with the
// overflow flag. A 5-bit counter is used so that saturation is reached.
module tb_freq_counter;
  localparam int W = 5;
  logic         ro_clk, clr;
  logic [W-1:0] count;
  logic         overflow;
  int checks = 0, failures = 0;

  freq_counter #(.WIDTH(W)) dut (.ro_clk(ro_clk), .clr(clr), .count(count), .overflow(overflow));

  task automatic burst(input int n, input int half_ps);
    repeat (n) begin
      #(half_ps) ro_clk = 1'b1;
      #(half_ps) ro_clk = 1'b0;
    end
  endtask

  task automatic expect_count(input int n);
    int sat;
    sat = (n > 2**W - 1) ? 2**W - 1 : n;
    checks++;
    if (count !== W'(sat) || overflow !== (n > 2**W - 1)) begin
      failures++;
      $display("FAIL after %0d edges: count=%0d overflow=%b", n, count, overflow);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ro_clk = 1'b0;
    clr = 1'b0;
    #100;
    clr = 1'b1;
    #1000;
    checks++;
    if (count !== '0 || overflow !== 1'b0) begin
      failures++;
      $display("FAIL clear");
    end
    for (int n = 0; n < 40; n++) begin
      clr = 1'b1;
      #100;
      clr = 1'b0;
      #100;
      burst(n, 250 + 37 * (n % 5));
      #100;
      expect_count(n);
    end
    // Edges while clr is held are ignored.
    clr = 1'b1;
    burst(7, 300);
    clr = 1'b0;
    #100;
    expect_count(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
