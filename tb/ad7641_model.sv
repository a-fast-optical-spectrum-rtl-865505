// ad7641_model -- behavioural model of the SAR ADC, for simulation only.
//
// Models the converter as the acquisition logic sees it in 16-bit parallel
// mode. The falling edge of convst (the middle of a CCD pixel period, since
// CONVST is the 1 MHz clock gated) samples the analog input ain and starts
// a conversion; busy rises T_BUSY ns later, the result (the low 16 bits of
// ain) appears on data T_CONV ns after the sampling edge and busy falls
// T_HOLD ns after that, so the result is stable at busy's falling edge.
// T_CONV + T_HOLD = 640 ns fits the 1.5 MSPS normal mode. Not
// synthesizable: it uses delays.
//
// Interface: convst, ain (in); busy, data[15:0] (out); count (conversions
// finished, for the test bench).
module ad7641_model #(
  parameter int T_BUSY = 20,
  parameter int T_CONV = 630,
  parameter int T_HOLD = 10
) (
  input  logic        convst,
  input  int          ain,
  output logic        busy,
  output logic [15:0] data,
  output int          count
);
  int sample;

  initial begin
    busy  = 1'b0;
    data  = '0;
    count = 0;
  end

  always @(negedge convst) begin
    sample = ain;
    #(T_BUSY) busy = 1'b1;
    #(T_CONV - T_BUSY) data = 16'(sample);
    #(T_HOLD) begin
      busy  = 1'b0;
      count = count + 1;
    end
  end
endmodule
