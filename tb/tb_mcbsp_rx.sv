// tb_mcbsp_rx -- self-checking test of the serial command receiver.
//
// Sends 200 random 16-bit words in the serial frame format (frame sync, one
// bit clock of delay, 16 bits MSB first; data changes on the falling edge of
// the bit clock) with random idle gaps, and checks after each that word_o
// holds the word and word_tgl has flipped exactly once. It also checks the
// reset word, and that a frame sync in the middle of a word discards the
// partial word and receives the following one.
module tb_mcbsp_rx;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic clkr = 1'b0, rst_n = 1'b1, fsr = 1'b0, dr = 1'b0;
  logic [W-1:0] word_o;
  logic word_tgl;

  mcbsp_rx dut (.clkr(clkr), .rst_n(rst_n), .fsr(fsr), .dr(dr),
                .word_o(word_o), .word_tgl(word_tgl));

  always #50 clkr = ~clkr;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [W-1:0] w, input int nbits);
    @(negedge clkr) fsr = 1'b1;
    @(negedge clkr) fsr = 1'b0;
    for (int i = W - 1; i >= W - nbits; i--) begin
      dr = w[i];
      @(negedge clkr);
    end
    dr = 1'b0;
  endtask

  initial #1 rst_n = 1'b0;   // reset edge after time 0

  initial begin
    logic t0;
    logic [W-1:0] w;
    repeat (3) @(negedge clkr);
    check(word_o == 16'd4182 && word_tgl == 1'b0, "reset word");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      w  = W'($urandom);
      t0 = word_tgl;
      send(w, W);
      check(word_o == w, $sformatf("word %0d: got %h expected %h", n, word_o, w));
      check(word_tgl != t0, $sformatf("word %0d: toggle", n));
      repeat ($urandom_range(0, 5)) @(negedge clkr);
    end
    // aborted frame: 7 bits, then a complete word
    t0 = word_tgl;
    send(16'hA5A5, 7);
    check(word_tgl == t0, "partial word not delivered");
    send(16'h1234, W);
    check(word_o == 16'h1234 && word_tgl != t0, "word after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clkr);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
