// tb_adc_start_ctr -- self-checking test of the ADC conversion window.
//
// Drives a 1 MHz clock and a ROG pulse of 8 clocks (changing on the falling
// edge, as the frame generator does), then builds the CCD clock
// (clk AND NOT rog) and the CONVST burst (clk AND adc_start) in the bench.
// For each of three lines (one of them cut short by an early ROG pulse) it
// checks, by counting CCD clock pulses after ROG:
//   * exactly 2048 CONVST pulses, the first on CCD pulse 33 (pixel S1) and
//     the rest on consecutive CCD pulses;
//   * w_req high from before the first to after the last CONVST pulse;
//   * r_req rising only after w_req has fallen and cleared by ROG;
//   * all outputs low during ROG.
module tb_adc_start_ctr;
  localparam int NPIX = 2048, LEAD = 32, WIDTH = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1, rog = 1'b1;
  logic adc_start, w_req, r_req;

  adc_start_ctr dut (.clk(clk), .rst_n(rst_n), .rog(rog),
                     .adc_start(adc_start), .w_req(w_req), .r_req(r_req));

  always #500 clk = ~clk;

  wire ccd_clk = clk & ~rog;
  wire convst  = clk & adc_start;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int pix = 0;              // CCD pulses since ROG
  int n_conv = 0, first_conv = -1, last_conv = -1;
  bit gap = 0;
  bit wreq_at_conv_ok = 1;
  int rreq_rise_pix = -1;
  int wreq_fall_pix = -1;

  always @(posedge ccd_clk) pix++;
  always @(posedge convst) begin
    #1;
    if (n_conv == 0) first_conv = pix;
    else if (pix != last_conv + 1) gap = 1;
    last_conv = pix;
    n_conv++;
    if (!w_req) wreq_at_conv_ok = 0;
  end
  always @(posedge r_req) rreq_rise_pix = pix;
  always @(negedge w_req) wreq_fall_pix = pix;

  task automatic rog_pulse();
    @(negedge clk) rog <= 1'b1;
    repeat (WIDTH) @(negedge clk);
    check(!adc_start && !w_req && !r_req, "outputs low during ROG");
    rog <= 1'b0;
    pix = 0; n_conv = 0; first_conv = -1; last_conv = -1; gap = 0;
    wreq_at_conv_ok = 1; rreq_rise_pix = -1; wreq_fall_pix = -1;
  endtask

  task automatic check_line(input int line);
    check(n_conv == NPIX, $sformatf("line %0d: %0d CONVST pulses", line, n_conv));
    check(first_conv == LEAD + 1, $sformatf("line %0d: first CONVST on CCD pulse %0d", line, first_conv));
    check(!gap, $sformatf("line %0d: CONVST pulses consecutive", line));
    check(wreq_at_conv_ok, $sformatf("line %0d: w_req high at every CONVST", line));
    check(wreq_fall_pix > last_conv, $sformatf("line %0d: w_req outlasts last CONVST", line));
    check(rreq_rise_pix > wreq_fall_pix, $sformatf("line %0d: r_req after w_req", line));
    check(r_req, $sformatf("line %0d: r_req held until ROG", line));
  endtask

  initial #1 rst_n = 1'b0;   // reset edge after time 0

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rog_pulse();
    repeat (3000) @(negedge clk);
    check_line(1);
    // a line interrupted by ROG in the middle of the window
    rog_pulse();
    repeat (1000) @(negedge clk);
    check(adc_start && w_req && !r_req, "window open mid-line");
    rog_pulse();
    repeat (2200) @(negedge clk);
    check_line(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
