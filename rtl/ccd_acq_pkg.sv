// ccd_acq_pkg -- constants shared by the linear-CCD acquisition front end.
//
// The numbers describe the ILX511 line sensor and the FIFO that buffers one
// line of samples for the DSP. The sensor figures (2048 effective pixels,
// 32 leading dummy/optical-black outputs, more than 2088 clocks per line) and the
// FIFO shape (16 bits x 4096 words) follow the design; the default ROG
// period of 4182 clocks is the terminal count of the frame counter plus one.
// The ROG pulse width of 8 clocks is the stated 8 us pulse at the 1 MHz
// CCD clock. Every module takes these as parameter defaults, so a test can
// shrink them.
package ccd_acq_pkg;

  // CCD line structure (ILX511)
  localparam int unsigned NPIX        = 2048; // effective picture elements
  localparam int unsigned DUMMY_LEAD  = 32;   // dummy + optical black before S1
  localparam int unsigned MIN_LINE    = 2088; // CCD clocks required between ROG pulses

  // Frame (ROG) timing, in 1 MHz CCD clocks
  localparam int unsigned ROG_CNT_W   = 16;
  localparam int unsigned ROG_PERIOD  = 4182;
  localparam int unsigned ROG_WIDTH   = 8;

  // Clocking
  localparam int unsigned SYS_DIV     = 20;   // 20 MHz -> 1 MHz

  // Sample FIFO between ADC and DSP
  localparam int unsigned DATA_W      = 16;   // AD7641 in 16-bit parallel mode
  localparam int unsigned FIFO_AW     = 12;   // 4096 words

  // DSP command word width on the McBSP link
  localparam int unsigned CMD_W       = 16;

endpackage
