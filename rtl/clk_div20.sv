// clk_div20 -- divides the 20 MHz PLL clock down to the 1 MHz CCD clock.
//
// A modulo-DIV counter runs on the fast clock; the output register is high
// for the first DIV/2 counts and low for the rest, so for an even DIV the
// output has exactly 50% duty. With the default DIV = 20 a 20 MHz input gives
// the 1 MHz clock that drives the whole CCD/ADC timing chain, as in the
// design. The output is a register (glitch free) and changes on the rising
// edge of clk_in; it rises one clk_in cycle after reset is released.
//
// Interface: clk_in (fast clock), rst_n (asynchronous, active low),
// clk_out (divided clock). Reset values and the use of a single counter are
// this implementation's choices.
module clk_div20 #(
  parameter int unsigned DIV = ccd_acq_pkg::SYS_DIV
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      clk_out <= (cnt < CW'(DIV / 2));
    end
  end

  initial assert (DIV >= 2) else $error("clk_div20: DIV must be at least 2");
endmodule
