// tb_clk_div20 -- self-checking test of the 20:1 clock divider.
//
// Drives a 20 MHz clock, releases reset and measures every period and high
// time of the divided clock in input cycles over 50 output periods. Each
// period must be 20 input cycles and each high phase 10 (1 MHz, 50% duty).
// A watchdog ends the run with a failure if the output stops toggling.
module tb_clk_div20;
  localparam int DIV = 20;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic clk_out;

  clk_div20 dut (.clk_in(clk), .rst_n(rst_n), .clk_out(clk_out));

  always #25 clk = ~clk;   // 20 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial #1 rst_n = 1'b0;   // reset edge after time 0

  initial begin
    int t_rise, t_fall, last_rise;
    repeat (3) @(posedge clk);
    check(clk_out == 1'b0, "output low in reset");
    rst_n = 1'b1;
    @(posedge clk_out); last_rise = cyc;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk_out); t_fall = cyc;
      @(posedge clk_out); t_rise = cyc;
      check(t_fall - last_rise == DIV / 2, $sformatf("high time %0d", t_fall - last_rise));
      check(t_rise - last_rise == DIV,     $sformatf("period %0d", t_rise - last_rise));
      last_rise = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
