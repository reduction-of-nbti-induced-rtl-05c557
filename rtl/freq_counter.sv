`timescale 1ps/1ps
// freq_counter: counts the rising edges of an oscillator output.
//
// The counter is clocked by the oscillator itself, so it works at any
// oscillator frequency without needing a faster system clock. clr clears it
// asynchronously; the controller raises clr only while every oscillator is
// asleep, so no oscillator edge is near the release of clr. The count
// saturates at all ones and raises overflow instead of wrapping, so a
// too-short counter shows up as a flag rather than as a wrong frequency.
//
// After a measurement window the oscillator is asleep and count is static,
// which is what lets the system-clock controller read it without a
// synchronizer.
//
// Interface: ro_clk (oscillator output), clr (active high, asynchronous),
// count, overflow. WIDTH = 16 holds an 85 us window up to 770 MHz. The whole
// block is this design's own: the measuring circuit is not specified beyond
// counting the oscillator frequency.
module freq_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [WIDTH-1:0] count,
  output logic             overflow
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (count == '1) begin
      overflow <= 1'b1;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
