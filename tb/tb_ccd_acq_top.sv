// tb_ccd_acq_top -- end-to-end test of the acquisition front end.
//
// The top runs at its default sizes (2048 pixels, 4182-clock frames, 4096
// word FIFO) from a 20 MHz clock. Around it:
//   * ilx511_model plays the sensor: output k of a line (k-th CCD clock
//     after ROG) carries the number (frame mod 8) * 8192 + k;
//   * ad7641_model samples it on each CONVST falling edge and answers with a
//     BUSY pulse, so a correctly placed window delivers outputs 33..2080,
//     the effective pixels S1..S2048, in order;
//   * a DSP model waits for r_req, lets 2 us pass (interrupt latency), then
//     issues 2048+3 read strobes of 20 ns on r_clk, drops the first three
//     words and compares the other 2048 with the expected line;
//   * a serial-port task sends ROG periods to the top.
// Sequence: two lines at the reset period; period 3000 sent and lines read
// at that period; period 100 sent, which must be raised to 2097 (too short
// for the DSP to read, so those lines are left in the FIFO and must be
// discarded at the next ROG); period 4182 sent again and reading resumes.
// Checked per frame: ROG low for 8 us, frame period, CCD clock pulses
// per frame (= period - 8, more than 2088), 2048 CONVST pulses, FIFO
// contents. Each mechanism (line read, period change, clamp, lead words
// seen empty, unread line cleared at ROG) must occur at least once.
module tb_ccd_acq_top;
  localparam int NPIX = 2048, WIDTH = 8, PERIOD = 4182, MIN_PERIOD = 8 + 2088 + 1;
  int checks = 0, failures = 0;

  logic clk_20m = 1'b0, rst_n = 1'b1;
  logic mcbsp_clkr = 1'b0, mcbsp_fsr = 1'b0, mcbsp_dr = 1'b0;
  logic ccd_clk, ccd_rog, adc_convst, adc_busy;
  logic [15:0] adc_in, adc_out;
  logic r_clk = 1'b1;
  logic r_req, rdempty, w_req, wr_full;
  logic [11:0] rdusedw, wrusedw;
  int adc_count, vout, frame_no;

  ccd_acq_top dut (.*);

  ilx511_model u_ccd (.rog_n(ccd_rog), .ccd_clk(ccd_clk), .vout(vout), .frame_no(frame_no));
  ad7641_model u_adc (.convst(adc_convst), .ain(vout), .busy(adc_busy), .data(adc_in), .count(adc_count));

  always #25 clk_20m = ~clk_20m;        // 20 MHz
  always #50 mcbsp_clkr = ~mcbsp_clkr;  // 10 MHz serial bit clock

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_frames = 0, n_lines_ok = 0, n_period_prog = 0, n_clamped = 0;
  int n_lead_empty = 0, n_unread_cleared = 0, n_convst_frames = 0;

  // ---------------- frame measurements ----------------
  realtime t_fall = 0, t_prev_fall = 0;
  int ccd_pulses = 0, convst_pulses = 0;
  int expect_period = PERIOD;   // period the next complete frame must have
  int last_period = 0;
  bit line_ready = 1'b0, line_read = 1'b0;   // r_req seen / line read this frame

  always @(posedge ccd_clk)    ccd_pulses++;
  always @(posedge adc_convst) convst_pulses++;

  always @(negedge ccd_rog) if (rst_n) begin
    t_prev_fall = t_fall;
    t_fall = $realtime;
    if (line_ready && !line_read) n_unread_cleared++;
    line_ready = 1'b0;
    line_read  = 1'b0;
    if (n_frames > 0) begin
      last_period = int'((t_fall - t_prev_fall) / 1000.0);
      check(ccd_pulses == last_period - WIDTH,
            $sformatf("frame %0d: %0d CCD pulses, period %0d", n_frames, ccd_pulses, last_period));
      check(ccd_pulses > 2088, "more than 2088 CCD clocks per frame");
      check(convst_pulses == NPIX, $sformatf("frame %0d: %0d CONVST pulses", n_frames, convst_pulses));
      if (convst_pulses == NPIX) n_convst_frames++;
      if (last_period == 3000)       n_period_prog++;
      if (last_period == MIN_PERIOD) n_clamped++;
    end
    n_frames++;
    ccd_pulses = 0;
    convst_pulses = 0;
  end

  always @(posedge ccd_rog) if (rst_n && n_frames > 0)
    check(int'(($realtime - t_fall) / 1000.0) == WIDTH, "ROG pulse 8 us");

  // ---------------- DSP model ----------------
  bit dsp_enable = 1'b1;
  always @(posedge r_req) line_ready = 1'b1;
  always @(posedge r_req) if (dsp_enable) begin
    int base, bad;
    logic [15:0] w;
    base = (frame_no % 8) * 8192 + 33;     // pixel S1 of this frame's line
    bad  = 0;
    #2000;
    for (int k = 1; k <= NPIX + 3; k++) begin
      #5 r_clk = 1'b0;
      #10;
      if (k == 1 && rdempty) n_lead_empty++;
      w = adc_out;
      if (k > 3 && w != 16'(base + k - 4)) begin
        if (bad < 5) $display("  word %0d: got %0d expected %0d", k - 4, w, 16'(base + k - 4));
        bad++;
      end
      r_clk = 1'b1;
      #5;
    end
    check(bad == 0, $sformatf("line read from FIFO: %0d wrong words", bad));
    check(r_req, "burst finished inside the read window");
    check(rdempty, "FIFO empty after the burst");
    if (bad == 0) n_lines_ok++;
    line_read = 1'b1;
  end

  // ---------------- serial command ----------------
  task automatic send_period(input logic [15:0] p);
    @(negedge mcbsp_clkr) mcbsp_fsr = 1'b1;
    @(negedge mcbsp_clkr) mcbsp_fsr = 1'b0;
    for (int i = 15; i >= 0; i--) begin
      mcbsp_dr = p[i];
      @(negedge mcbsp_clkr);
    end
    mcbsp_dr = 1'b0;
  endtask

  initial #1 rst_n = 1'b0;

  initial begin
    #200 rst_n = 1'b1;
    repeat (3) @(negedge ccd_rog);             // two complete frames at reset period
    check(last_period == PERIOD, $sformatf("reset period %0d", last_period));
    send_period(16'd3000);
    repeat (3) @(negedge ccd_rog);
    check(last_period == 3000, $sformatf("programmed period %0d", last_period));
    dsp_enable = 1'b0;                         // next frames are too short to read
    send_period(16'd100);
    repeat (3) @(negedge ccd_rog);
    check(last_period == MIN_PERIOD, $sformatf("clamped period %0d", last_period));
    send_period(16'(PERIOD));
    @(negedge ccd_rog);                        // this frame has the long period again
    dsp_enable = 1'b1;
    repeat (2) @(negedge ccd_rog);
    check(last_period == PERIOD, $sformatf("restored period %0d", last_period));

    check(n_lines_ok >= 5,        $sformatf("lines read correctly: %0d", n_lines_ok));
    check(n_period_prog >= 1,     $sformatf("frames at programmed period: %0d", n_period_prog));
    check(n_clamped >= 1,         $sformatf("frames at clamped period: %0d", n_clamped));
    check(n_lead_empty >= 1,      $sformatf("bursts starting on an empty view: %0d", n_lead_empty));
    check(n_unread_cleared >= 1,  $sformatf("unread lines cleared at ROG: %0d", n_unread_cleared));
    check(n_convst_frames >= 8,   $sformatf("frames with full CONVST burst: %0d", n_convst_frames));
    check(!wr_full, "FIFO never full in normal operation");
    $display("frames=%0d lines_ok=%0d period_prog=%0d clamped=%0d lead_empty=%0d cleared=%0d",
             n_frames, n_lines_ok, n_period_prog, n_clamped, n_lead_empty, n_unread_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
