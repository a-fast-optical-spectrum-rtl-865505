// ilx511_model -- behavioural model of the linear CCD, for simulation only.
//
// Stands in for the sensor's video output with a number instead of a
// voltage. A falling edge of rog_n (the ROG pulse) starts a new line and
// advances frame_no; each rising edge of ccd_clk after it shifts out the
// next output, which appears on vout OUT_DELAY ns later and holds until the
// next clock. Output k of a line (k = 1 for the first clock after ROG) is
// coded as (frame_no mod 8) * 8192 + k, so outputs 1-32 are the leading
// dummy/optical-black outputs and 33-2080 the effective pixels S1-S2048.
// Not synthesizable: it uses delays.
//
// Interface: rog_n, ccd_clk (in); vout, frame_no (out).
module ilx511_model #(
  parameter int OUT_DELAY = 50
) (
  input  logic rog_n,
  input  logic ccd_clk,
  output int   vout,
  output int   frame_no
);
  int k;

  initial begin
    vout     = 0;
    frame_no = 0;
    k        = 0;
  end

  always @(negedge rog_n) begin
    frame_no = frame_no + 1;
    k        = 0;
  end

  always @(posedge ccd_clk) begin
    k = k + 1;
    #(OUT_DELAY) vout = (frame_no % 8) * 8192 + k;
  end
endmodule
