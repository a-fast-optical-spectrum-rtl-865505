// adc_start_ctr -- per-line ADC conversion window and FIFO/DSP requests.
//
// After each ROG pulse the sensor shifts out one line: DUMMY_LEAD dummy and
// optical-black outputs, then the NPIX effective pixels, then trailing
// dummies. This block counts CCD clocks from the end of the ROG pulse and
//   * holds adc_start high for exactly the NPIX clock periods of the
//     effective pixels; ANDed with the 1 MHz clock outside, it becomes the
//     ADC CONVST burst of NPIX pulses at 50% duty, one per pixel;
//   * holds w_req (FIFO write request) high over the same window plus one
//     clock, so that the FIFO write caused by the last conversion, which the
//     ADC completes within the following clock period, is still enabled;
//   * raises r_req (the DSP's read request / interrupt) one clock after
//     w_req falls, when the whole line sits in the FIFO, and holds it until
//     the next ROG pulse.
// rog is active high (the inverted ROG line); while it is high all outputs
// are low and the count restarts.
//
// Timing: clk is the 1 MHz CCD clock. State changes on its FALLING edge so
// that adc_start is stable around every rising edge, where the external AND
// gate passes the clock. If the falling edge that ends the ROG pulse is E0,
// the k-th CCD clock pulse after ROG rises between Ek-1 and Ek; adc_start is
// set at E(DUMMY_LEAD) so the first CONVST pulse coincides with CCD pulse
// DUMMY_LEAD+1, the first effective pixel S1, and the last with pixel
// S(NPIX). The window position follows the sensor's line structure; the
// extra clock of w_req, the exact r_req timing and the falling-edge timing
// are this implementation's choices.
module adc_start_ctr #(
  parameter int unsigned NPIX       = ccd_acq_pkg::NPIX,
  parameter int unsigned DUMMY_LEAD = ccd_acq_pkg::DUMMY_LEAD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rog,
  output logic adc_start,
  output logic w_req,
  output logic r_req
);
  localparam int unsigned LAST = DUMMY_LEAD + NPIX + 2;  // count where r_req rises
  localparam int unsigned CW   = $clog2(LAST + 2);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_next;

  always_comb cnt_next = (cnt == CW'(LAST)) ? cnt : cnt + 1'b1;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      adc_start <= 1'b0;
      w_req     <= 1'b0;
      r_req     <= 1'b0;
    end else if (rog) begin
      cnt       <= '0;
      adc_start <= 1'b0;
      w_req     <= 1'b0;
      r_req     <= 1'b0;
    end else begin
      cnt       <= cnt_next;
      adc_start <= (cnt_next >= CW'(DUMMY_LEAD)) && (cnt_next < CW'(DUMMY_LEAD + NPIX));
      w_req     <= (cnt_next >= CW'(DUMMY_LEAD)) && (cnt_next <= CW'(DUMMY_LEAD + NPIX));
      r_req     <= (cnt_next == CW'(LAST));
    end
  end

  initial assert (DUMMY_LEAD >= 1 && NPIX >= 1)
    else $error("adc_start_ctr: DUMMY_LEAD and NPIX must be at least 1");

  // r_req and adc_start are never high together
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(adc_start && r_req));
endmodule
