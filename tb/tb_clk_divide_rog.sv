// tb_clk_divide_rog -- self-checking test of the ROG frame generator.
//
// Runs the generator at its default sizes on a 1 MHz clock and measures, in
// clock cycles, the low (ROG asserted) time and the period of the ROG line:
//   frame 1     : reset period 4182, pulse 8 clocks;
//   period 5000 : applied from the frame after the one in which it was set;
//   period 100  : below the minimum, so the frame is 8 + 2088 + 1 = 2097 clocks;
// and checks one frame_start strobe per frame, on the first frame clock.
module tb_clk_divide_rog;
  localparam int WIDTH = 8, MIN_LINE = 2088, PERIOD = 4182;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [15:0] period_i = 16'(PERIOD);
  logic clk4, frame_start;

  clk_divide_rog dut (.clk_in(clk), .rst_n(rst_n), .period_i(period_i),
                      .clk4(clk4), .frame_start(frame_start));

  always #500 clk = ~clk;   // 1 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  int fs_count = 0;
  always @(negedge clk) begin
    cyc++;
    if (frame_start) fs_count++;
  end

  // measure one frame starting at a falling edge of clk4; return width, period
  task automatic frame(output int width, output int period);
    int t0, t1, t2;
    t0 = cyc;
    @(posedge clk4); t1 = cyc;
    @(negedge clk4); t2 = cyc;
    width = t1 - t0; period = t2 - t0;
  endtask

  initial #1 rst_n = 1'b0;   // reset edge after time 0

  initial begin
    int w, p, fs0;
    repeat (2) @(negedge clk);
    check(clk4 == 1'b0, "ROG asserted in reset");
    rst_n = 1'b1;
    @(negedge clk4);               // start of frame 2 (frame 1 began at reset)
    fs0 = fs_count;
    frame(w, p);
    check(w == WIDTH,  $sformatf("width %0d", w));
    check(p == PERIOD, $sformatf("default period %0d", p));
    check(fs_count - fs0 == 1, "one frame_start per frame");
    // change the period in the middle of a frame
    repeat (100) @(negedge clk);
    period_i = 16'd5000;
    @(negedge clk4);               // current frame still has the old length
    frame(w, p);
    check(p == 5000, $sformatf("programmed period %0d", p));
    check(w == WIDTH, "width unchanged");
    period_i = 16'd100;
    @(negedge clk4);
    frame(w, p);
    check(p == WIDTH + MIN_LINE + 1, $sformatf("clamped period %0d", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
