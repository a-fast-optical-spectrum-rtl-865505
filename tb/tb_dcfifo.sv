// tb_dcfifo -- self-checking test of the dual-clock sample FIFO.
//
// Runs the FIFO at its default size (16 bits x 4096) with unrelated clocks
// and compares every word read with a queue model:
//   1. streaming: random write and read requests on a 37 ns write clock and
//      a 10 ns read clock;
//   2. fill: 4100 write attempts with no reads; wrfull must rise after
//      exactly 4096 accepted words, wrusedw must count them and the four
//      extra writes must be dropped;
//   3. burst read with a strobe-only read clock (as the DSP's read strobe):
//      the first two strobes see rdempty, the first word appears on q after
//      the third, and every word comes out in order;
//   4. aclr empties both sides;
//   5. a 2048-word line written with a 10 ns write clock and read back with a
//      1 ns read clock: the read burst must take about a tenth of the time.
module tb_dcfifo;
  localparam int DW = 16, AW = 12, DEPTH = 1 << AW;
  int checks = 0, failures = 0;

  logic aclr = 1'b0;
  logic wrclk = 1'b0, rdclk = 1'b0;
  logic wrreq = 1'b0, rdreq = 1'b0;
  logic [DW-1:0] data = '0, q;
  logic wrfull, rdempty;
  logic [AW-1:0] wrusedw, rdusedw;

  dcfifo dut (.*);

  bit wr_run = 1'b0, rd_run = 1'b0;
  always #18.5 if (wr_run) wrclk = ~wrclk;
  always #5.3  if (rd_run) rdclk = ~rdclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [DW-1:0] model[$];
  int n_wr = 0, n_rd = 0;

  // write-side scoreboard
  always @(posedge wrclk) if (!aclr && wrreq && !wrfull) begin
    model.push_back(data);
    n_wr++;
  end

  // read-side check: q after an accepted read must be the oldest model word
  always @(posedge rdclk) if (!aclr && rdreq && !rdempty) begin
    logic [DW-1:0] exp;
    exp = model.pop_front();
    #0.2;
    n_rd++;
    if (q !== exp) begin
      failures++;
      $display("FAIL: read %0d got %h expected %h", n_rd, q, exp);
    end
  end

  initial begin
    int full_at;
    #1 aclr = 1'b1;
    #100 aclr = 1'b0;
    // 1. streaming
    wr_run = 1; rd_run = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge wrclk);
      wrreq <= ($urandom_range(0, 3) != 0);
      data  <= DW'($urandom);
      rdreq <= ($urandom_range(0, 1) != 0);
    end
    @(negedge wrclk) wrreq <= 1'b0;
    rdreq <= 1'b1;
    repeat (20000) begin
      @(posedge rdclk);
      if (model.size() == 0 && rdempty) break;
    end
    checks++;
    if (n_rd != n_wr || n_wr < 1000) begin
      failures++; $display("FAIL: streamed %0d written %0d read", n_wr, n_rd);
    end
    rdreq = 1'b0;
    repeat (5) @(posedge wrclk);
    check(wrusedw == 0 && !wrfull, "write side sees empty after drain");
    check(rdempty && rdusedw == 0, "read side empty after drain");

    // 2. fill without reads
    rd_run = 0;
    full_at = -1;
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wrclk);
      if (wrfull && full_at < 0) full_at = i;
      if (i > 0 && i < DEPTH && !wrfull) begin
        checks++;
        if (wrusedw != AW'(i)) begin failures++; $display("FAIL: wrusedw %0d at %0d", wrusedw, i); end
      end
      wrreq = 1'b1; data = DW'(i * 7 + 3);
    end
    @(negedge wrclk) wrreq = 1'b0;
    check(full_at == DEPTH, $sformatf("wrfull after %0d words", full_at));
    check(wrfull && wrusedw == 0, "full: wrusedw wraps to 0");
    check(model.size() == DEPTH, $sformatf("%0d words accepted", model.size()));
    wr_run = 0;

    // 3. strobe-only burst read of the full FIFO
    rdreq = 1'b1;
    for (int k = 1; k <= DEPTH + 3; k++) begin
      #7 rdclk = 1'b0;
      if (k <= 2) check(rdempty, $sformatf("strobe %0d sees rdempty", k));
      if (k == 3) check(!rdempty && rdusedw == 0, "strobe 3: data visible, rdusedw wrapped");
      #7 rdclk = 1'b1;
    end
    #7 rdclk = 1'b0;
    check(rdempty, "empty after burst");
    check(model.size() == 0, "all words read");
    rdreq = 1'b0;

    // 4. aclr clears both sides
    wr_run = 1;
    @(negedge wrclk) wrreq = 1'b1;
    repeat (10) @(negedge wrclk);
    wrreq = 1'b0;
    #5 aclr = 1'b1;
    #5;
    check(!wrfull && wrusedw == 0 && rdempty && rdusedw == 0 && q == '0, "aclr clears");
    model.delete();
    #20 aclr = 1'b0;

    // 5. one line at 10 ns per write, read back at 1 ns per read
    wr_run = 0; rd_run = 0;
    wrclk = 1'b0; rdclk = 1'b0;
    begin
      realtime t0, t_wr, t_rd;
      int strobes;
      t0 = $realtime;
      for (int i = 0; i < 2048; i++) begin
        wrreq = 1'b1; data = DW'(16'hC000 + i);
        #5 wrclk = 1'b1;
        #5 wrclk = 1'b0;
      end
      wrreq = 1'b0;
      t_wr = $realtime - t0;
      check(wrusedw == AW'(2048), "line written");
      t0 = $realtime;
      rdreq = 1'b1;
      strobes = 0;
      while (model.size() != 0 && strobes < 3000) begin
        #0.5 rdclk = 1'b1;
        #0.5 rdclk = 1'b0;
        strobes++;
      end
      rdreq = 1'b0;
      t_rd = $realtime - t0;
      check(model.size() == 0 && strobes == 2048 + 2, $sformatf("line read in %0d strobes", strobes));
      check(t_wr >= 9.9 * t_rd, $sformatf("write %0t ns, read %0t ns", t_wr, t_rd));
    end

    $display("reads checked: %0d", n_rd);
    check(n_rd > DEPTH + 1000, "enough reads checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
