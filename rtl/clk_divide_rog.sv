// clk_divide_rog -- frame counter that produces the CCD ROG (shift) pulse.
//
// A CNT_W-bit counter runs on the 1 MHz CCD clock and wraps every
// `period_q` clocks. The output clk4 is the ROG line of the sensor: it is
// low (ROG asserted, the negative pulse the ILX511 expects) for the first
// WIDTH clocks of each frame and high for the rest, so every frame is one
// ROG pulse followed by period-WIDTH CCD clocks for the line read-out. As in
// the design, the frame length is a free-running count (default 4182 clocks,
// the terminal count 4181 of the original counter plus one) that the DSP can
// change at run time: period_i is taken over at the end of each frame, so a
// new value never cuts a frame short. A value smaller than
// WIDTH + MIN_LINE + 1 (more than MIN_LINE = 2088 CCD clocks per line) is
// raised to that minimum, and one wider than the counter cannot be expressed at all. The
// first frame after reset is PERIOD clocks long.
//
// Timing: the counter and clk4 change on the FALLING edge of clk_in. The
// 1 MHz clock is also ANDed with clk4 outside this block to form the CCD
// clock; changing clk4 half a period away from the rising edge keeps that
// gate free of glitches. This edge choice, the reset state (frame starts
// with ROG asserted) and the clamp are this implementation's choices.
//
// Interface: clk_in (1 MHz), rst_n (asynchronous, active low), period_i
// (frame length in clocks, quasi-static, in clk_in's domain), clk4 (ROG,
// active low), frame_start (one-clock strobe on the first clock of a frame).
module clk_divide_rog #(
  parameter int unsigned CNT_W    = ccd_acq_pkg::ROG_CNT_W,
  parameter int unsigned WIDTH    = ccd_acq_pkg::ROG_WIDTH,
  parameter int unsigned MIN_LINE = ccd_acq_pkg::MIN_LINE,
  parameter int unsigned PERIOD   = ccd_acq_pkg::ROG_PERIOD
) (
  input  logic             clk_in,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] period_i,
  output logic             clk4,
  output logic             frame_start
);
  localparam logic [CNT_W-1:0] MIN_PERIOD = CNT_W'(WIDTH + MIN_LINE + 1);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] period_q;
  logic [CNT_W-1:0] period_clamped;
  logic             wrap;
  logic [CNT_W-1:0] cnt_next;

  always_comb begin
    period_clamped = (period_i < MIN_PERIOD) ? MIN_PERIOD : period_i;
    wrap           = (cnt >= period_q - 1'b1);
    cnt_next       = wrap ? '0 : cnt + 1'b1;
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      period_q    <= CNT_W'(PERIOD);
      clk4        <= 1'b0;
      frame_start <= 1'b1;
    end else begin
      cnt         <= cnt_next;
      if (wrap) period_q <= period_clamped;
      clk4        <= !(cnt_next < CNT_W'(WIDTH));
      frame_start <= wrap;
    end
  end

  initial assert (WIDTH >= 1 && WIDTH + MIN_LINE + 1 < (1 << CNT_W) && PERIOD > WIDTH + MIN_LINE)
    else $error("clk_divide_rog: bad WIDTH/MIN_LINE/PERIOD for CNT_W bits");
endmodule
