`timescale 1ps/1ps
// measure_ctrl: measurement scheduler for a bank of ring oscillators.
//
// Once per period (one minute by default) the controller sweeps over all
// NUM_RO oscillators, one at a time: it selects the oscillator onto the
// shared counter and clears the counter (CLEAR_CYC cycles), puts that one
// oscillator in oscillation mode for the measurement window (85 us by
// default), returns it to sleep and waits SETTLE_CYC cycles for the ring and
// the counter to come to rest, then captures the count and reports it on the
// result port for one cycle. Every other oscillator sleeps all the time, so
// each ring spends 85 us per minute oscillating and the rest of the time
// parked with its PMOS selectors off; only one ring runs at once, which keeps
// the rest of the chip quiet during a measurement. The first sweep starts
// right after reset.
//
// Interface (all on clk, active-low synchronous reset rst_n):
//   osc_en[i]      1 puts oscillator i in oscillation mode (registered,
//                  glitch-free, at most one bit set)
//   sel            oscillator routed to the counter (registered)
//   cnt_clr        clears the counter (registered, glitch-free); it rises
//                  at the start of every measurement and is low while idle,
//                  so each measurement begins with a clear edge
//   count / cnt_overflow   from the counter, read only when it is static
//   result_*       one-cycle report: oscillator index, count, overflow flag
//   sweep_done     one-cycle pulse after the last oscillator of a sweep
//   busy           a sweep is in progress
// A period tick that arrives during a sweep is held and starts the next sweep
// as soon as the current one ends.
//
// Window length and repetition follow the published experiment; the clock
// frequency (the 50 MHz board oscillator), the sequential one-at-a-time order
// and the clear/settle times are this design's own choices.
module measure_ctrl #(
  parameter int unsigned NUM_RO     = 12,
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned WINDOW_NS  = 85_000,
  parameter int unsigned PERIOD_US  = 60_000_000,
  parameter int unsigned CLEAR_CYC  = 4,
  parameter int unsigned SETTLE_CYC = 8,
  localparam int unsigned IDX_W     = (NUM_RO > 1) ? $clog2(NUM_RO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NUM_RO-1:0] osc_en,
  output logic [IDX_W-1:0]  sel,
  output logic              cnt_clr,
  input  logic [CNT_W-1:0]  count,
  input  logic              cnt_overflow,
  output logic              result_valid,
  output logic [IDX_W-1:0]  result_idx,
  output logic [CNT_W-1:0]  result_count,
  output logic              result_overflow,
  output logic              sweep_done,
  output logic              busy
);

  localparam longint unsigned WINDOW_CYC = (longint'(CLK_HZ) * WINDOW_NS) / 64'd1_000_000_000;
  localparam longint unsigned PERIOD_CYC = (longint'(CLK_HZ) * PERIOD_US) / 64'd1_000_000;
  localparam int unsigned     TMR_W      = $clog2(PERIOD_CYC + 1);
  localparam int unsigned     PH_W       = $clog2(WINDOW_CYC + 64'(CLEAR_CYC) + 64'(SETTLE_CYC) + 1);

  if (WINDOW_CYC < 1 || CLEAR_CYC < 1 || SETTLE_CYC < 1) begin : g_bad_timing
    $error("measure_ctrl: window, clear and settle times must each be at least one cycle");
  end

  typedef enum logic [2:0] {
    S_IDLE,
    S_CLEAR,
    S_RUN,
    S_SETTLE,
    S_CAPTURE
  } state_e;

  state_e             state;
  logic [PH_W-1:0]    phase;     // cycles spent in the current state
  logic [TMR_W-1:0]   timer;     // period timer
  logic               pending;   // a sweep is due

  // Period timer and sweep request.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer   <= '0;
      pending <= 1'b1;
    end else begin
      if (timer == TMR_W'(PERIOD_CYC - 1)) begin
        timer   <= '0;
        pending <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
        if (state == S_IDLE && pending) pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      phase           <= '0;
      sel             <= '0;
      osc_en          <= '0;
      cnt_clr         <= 1'b0;
      result_valid    <= 1'b0;
      result_idx      <= '0;
      result_count    <= '0;
      result_overflow <= 1'b0;
      sweep_done      <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      sweep_done   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt_clr <= 1'b0;
          if (pending) begin
            state   <= S_CLEAR;
            phase   <= '0;
            sel     <= '0;
            cnt_clr <= 1'b1;
          end
        end
        S_CLEAR: begin
          if (phase == PH_W'(CLEAR_CYC - 1)) begin
            state           <= S_RUN;
            phase           <= '0;
            cnt_clr         <= 1'b0;
            osc_en          <= '0;
            osc_en[sel]     <= 1'b1;
          end else begin
            phase <= phase + 1'b1;
          end
        end
        S_RUN: begin
          if (phase == PH_W'(WINDOW_CYC - 1)) begin
            state  <= S_SETTLE;
            phase  <= '0;
            osc_en <= '0;
          end else begin
            phase <= phase + 1'b1;
          end
        end
        S_SETTLE: begin
          if (phase == PH_W'(SETTLE_CYC - 1)) begin
            state <= S_CAPTURE;
            phase <= '0;
          end else begin
            phase <= phase + 1'b1;
          end
        end
        S_CAPTURE: begin
          result_valid    <= 1'b1;
          result_idx      <= sel;
          result_count    <= count;
          result_overflow <= cnt_overflow;
          cnt_clr         <= 1'b1;
          phase           <= '0;
          if (sel == IDX_W'(NUM_RO - 1)) begin
            state      <= S_IDLE;
            sweep_done <= 1'b1;
          end else begin
            state <= S_CLEAR;
            sel   <= sel + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Only one oscillator runs at a time, never while the counter is cleared.
  a_one_ring: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(osc_en));
  a_no_clr_while_running: assert property (@(posedge clk) disable iff (!rst_n)
                                           (osc_en != '0) |-> !cnt_clr);

endmodule
