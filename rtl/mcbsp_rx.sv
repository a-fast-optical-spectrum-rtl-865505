// mcbsp_rx -- receiver for command words sent by the DSP's serial port.
//
// The DSP sets the acquisition parameters (in this design the ROG period,
// i.e. the line time and exposure) over its multichannel buffered serial
// port. This block receives one CMD_W-bit word per frame: a frame sync pulse
// on fsr, one bit clock of data delay, then CMD_W data bits, MSB first, all
// sampled on the rising edge of the bit clock clkr. When the last bit is in,
// the word appears on word_o and word_tgl flips; the toggle lets a slower
// clock domain detect the new word with a plain two-flip-flop synchronizer.
// A new fsr pulse during a word restarts reception.
//
// Only the existence of the link and its use for the ROG period come from
// the design. Frame format (1-bit data delay, MSB first, active-high frame
// sync, sampling edge), word width and the toggle handshake are this
// implementation's choices, set to match a common serial port setting.
//
// Interface: clkr, rst_n (asynchronous, active low), fsr, dr,
// word_o (last complete word, reset value RESET_WORD), word_tgl.
module mcbsp_rx #(
  parameter int unsigned       CMD_W      = ccd_acq_pkg::CMD_W,
  parameter logic [CMD_W-1:0] RESET_WORD = CMD_W'(ccd_acq_pkg::ROG_PERIOD)
) (
  input  logic             clkr,
  input  logic             rst_n,
  input  logic             fsr,
  input  logic             dr,
  output logic [CMD_W-1:0] word_o,
  output logic             word_tgl
);
  localparam int unsigned BW = $clog2(CMD_W + 1);

  logic [CMD_W-2:0] shreg;   // first CMD_W-1 bits of the word
  logic [BW-1:0]    bits_left;

  always_ff @(posedge clkr or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      bits_left <= '0;
      word_o    <= RESET_WORD;
      word_tgl  <= 1'b0;
    end else if (fsr) begin
      bits_left <= BW'(CMD_W);
    end else if (bits_left != '0) begin
      shreg     <= {shreg[CMD_W-3:0], dr};
      bits_left <= bits_left - 1'b1;
      if (bits_left == BW'(1)) begin
        word_o   <= {shreg, dr};
        word_tgl <= ~word_tgl;
      end
    end
  end
endmodule
