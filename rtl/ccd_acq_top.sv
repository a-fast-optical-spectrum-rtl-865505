// ccd_acq_top -- FPGA logic of a linear-CCD spectrum acquisition system.
//
// The FPGA sits between an ILX511 2048-pixel line sensor, an 18-bit SAR ADC
// (AD7641, used in 16-bit parallel mode) and a DSP. It
//   1. divides the 20 MHz PLL clock to the 1 MHz CCD clock (clk_div20);
//   2. produces the sensor's ROG pulse once per frame, with a frame length
//      the DSP sets over its serial port (mcbsp_rx -> word_sync ->
//      clk_divide_rog);
//   3. opens a 2048-pulse ADC conversion window on the effective pixels of
//      each line and raises the write and read requests (adc_start_ctr);
//   4. gates the 1 MHz clock into the CCD clock (off during ROG) and into
//      the ADC CONVST burst, with two AND gates and an inverter on the ROG
//      line, as in the design;
//   5. buffers the line in a dual-clock FIFO (dcfifo) written on every
//      completed conversion (falling edge of ADC BUSY) and read by the DSP
//      in one burst on its external-memory read strobe once r_req (its
//      interrupt) is high.
// The FIFO is cleared during every ROG pulse (the pulse retimed to the
// 20 MHz clock, 0-50 ns late), so each read burst starts on pixel S1 even if
// the DSP skipped a line. Because the FIFO status crosses
// into the strobe domain only on strobe edges, a burst returns three
// invalid words before S1: the DSP issues NPIX+3 reads and drops the first
// three. The gate arrangement, request signals and FIFO size follow the
// design; the FIFO clear at ROG, the BUSY edge used as write clock and the
// three-word lead are this implementation's choices.
//
// Clocks: clk_20m (20 MHz), derived clk_1m (1 MHz; CCD timing changes on its
// falling edge), mcbsp_clkr (serial bit clock), adc_busy (write clock),
// r_clk (DSP read strobe, high when idle, a read completes on its rising
// edge). rst_n is asynchronous, active low.
module ccd_acq_top #(
  parameter int unsigned SYS_DIV    = ccd_acq_pkg::SYS_DIV,
  parameter int unsigned NPIX       = ccd_acq_pkg::NPIX,
  parameter int unsigned DUMMY_LEAD = ccd_acq_pkg::DUMMY_LEAD,
  parameter int unsigned MIN_LINE   = ccd_acq_pkg::MIN_LINE,
  parameter int unsigned ROG_WIDTH  = ccd_acq_pkg::ROG_WIDTH,
  parameter int unsigned ROG_PERIOD = ccd_acq_pkg::ROG_PERIOD,
  parameter int unsigned ROG_CNT_W  = ccd_acq_pkg::ROG_CNT_W,
  parameter int unsigned DATA_W     = ccd_acq_pkg::DATA_W,
  parameter int unsigned FIFO_AW    = ccd_acq_pkg::FIFO_AW
) (
  input  logic                 clk_20m,
  input  logic                 rst_n,
  // DSP serial port (command words: ROG period in CCD clocks)
  input  logic                 mcbsp_clkr,
  input  logic                 mcbsp_fsr,
  input  logic                 mcbsp_dr,
  // CCD
  output logic                 ccd_clk,
  output logic                 ccd_rog,      // active low
  // ADC
  output logic                 adc_convst,
  input  logic                 adc_busy,
  input  logic [DATA_W-1:0]    adc_in,
  // DSP external memory read port
  input  logic                 r_clk,
  output logic                 r_req,        // DSP interrupt: a line is ready
  output logic [DATA_W-1:0]    adc_out,
  output logic                 rdempty,
  output logic [FIFO_AW-1:0]   rdusedw,
  // monitors
  output logic                 w_req,
  output logic                 wr_full,
  output logic [FIFO_AW-1:0]   wrusedw
);
  localparam logic [ROG_CNT_W-1:0] PERIOD_RST = ROG_CNT_W'(ROG_PERIOD);

  logic                 clk_1m;
  logic                 rog;           // ROG line inverted: high during the pulse
  logic                 adc_start;
  logic                 frame_start;
  logic [ROG_CNT_W-1:0] cmd_word, period;
  logic                 cmd_tgl;
  logic                 fifo_aclr;

  clk_div20 #(.DIV(SYS_DIV)) u_div (
    .clk_in(clk_20m), .rst_n(rst_n), .clk_out(clk_1m)
  );

  mcbsp_rx #(.CMD_W(ROG_CNT_W), .RESET_WORD(PERIOD_RST)) u_mcbsp (
    .clkr(mcbsp_clkr), .rst_n(rst_n), .fsr(mcbsp_fsr), .dr(mcbsp_dr),
    .word_o(cmd_word), .word_tgl(cmd_tgl)
  );

  word_sync #(.W(ROG_CNT_W), .RESET_WORD(PERIOD_RST)) u_sync (
    .clk(clk_1m), .rst_n(rst_n), .src_word(cmd_word), .src_tgl(cmd_tgl),
    .dst_word(period)
  );

  clk_divide_rog #(
    .CNT_W(ROG_CNT_W), .WIDTH(ROG_WIDTH), .MIN_LINE(MIN_LINE), .PERIOD(ROG_PERIOD)
  ) u_rog (
    .clk_in(clk_1m), .rst_n(rst_n), .period_i(period),
    .clk4(ccd_rog), .frame_start(frame_start)
  );

  // inverter on the ROG line
  assign rog = ~ccd_rog;

  adc_start_ctr #(.NPIX(NPIX), .DUMMY_LEAD(DUMMY_LEAD)) u_start (
    .clk(clk_1m), .rst_n(rst_n), .rog(rog),
    .adc_start(adc_start), .w_req(w_req), .r_req(r_req)
  );

  // output AND gates: CCD clock stopped during ROG, CONVST burst in the window
  assign ccd_clk    = clk_1m & ccd_rog;
  assign adc_convst = clk_1m & adc_start;

  // FIFO clear: the ROG pulse retimed to the 20 MHz clock. It is low while
  // rst_n is low and rises on the first 20 MHz edge after reset, because a
  // frame starts with ROG asserted, so every clear is a clean edge.
  always_ff @(posedge clk_20m or negedge rst_n) begin
    if (!rst_n) fifo_aclr <= 1'b0;
    else        fifo_aclr <= rog;
  end

  dcfifo #(.DW(DATA_W), .AW(FIFO_AW)) u_fifo (
    .aclr(fifo_aclr),
    .wrclk(~adc_busy), .wrreq(w_req), .data(adc_in),
    .wrfull(wr_full), .wrusedw(wrusedw),
    .rdclk(r_clk), .rdreq(r_req), .q(adc_out),
    .rdempty(rdempty), .rdusedw(rdusedw)
  );

  // The frame-start strobe of the ROG generator is not needed at this level.
  logic unused_frame_start;
  assign unused_frame_start = frame_start;
endmodule
