// dcfifo -- dual-clock FIFO that decouples the ADC from the DSP.
//
// One line of samples is written at the ADC's pace (one word per completed
// conversion, on wrclk) and read later in a burst at the DSP's much higher
// bus speed (on rdclk). The storage is a DW x 2**AW memory (default
// 16 bits x 4096 words, room for two full 2048-pixel lines). Write and read
// pointers are AW+1-bit binary counters; each is passed to the other clock
// domain in Gray code through a two-flip-flop synchronizer, which is what
// makes the two clocks fully independent (here wrclk is the ADC BUSY line and
// rdclk the DSP read strobe, neither of them free running).
//
// Interface (named after the usual FPGA vendor FIFO):
//   write side: data, wrreq, wrclk -> wrfull, wrusedw
//   read side : rdreq, rdclk       -> q, rdempty, rdusedw
//   aclr      : asynchronous clear of both sides, active high
// A write is accepted on a rising wrclk edge with wrreq high and wrfull low;
// a read on a rising rdclk edge with rdreq high and rdempty low, and q then
// shows the word read from that edge on (registered output, no look-ahead).
// wrfull/wrusedw are exact for the write side and pessimistic by the
// synchronizer delay about reads; rdempty/rdusedw likewise about writes: a
// write becomes visible to the read side only after two rising rdclk edges.
// So a reader whose clock runs only while it reads sees rdempty for the first
// two strobes of a burst and gets the first word on q after the third; the
// word it samples during strobe k (before edge k) is word k-4. The usedw
// outputs are AW bits wide, so they read 0 when the FIFO holds 2**AW words
// (wrfull tells that case apart). aclr must be released while neither clock
// edge is near; in the acquisition system it is released during the ROG
// pulse, when neither the ADC nor the DSP touches the FIFO.
// The function and port names follow the design; the Gray-pointer structure
// and synchronizer depth are this implementation's choices.
module dcfifo #(
  parameter int unsigned DW = ccd_acq_pkg::DATA_W,
  parameter int unsigned AW = ccd_acq_pkg::FIFO_AW
) (
  input  logic          aclr,
  // write side
  input  logic          wrclk,
  input  logic          wrreq,
  input  logic [DW-1:0] data,
  output logic          wrfull,
  output logic [AW-1:0] wrusedw,
  // read side
  input  logic          rdclk,
  input  logic          rdreq,
  output logic [DW-1:0] q,
  output logic          rdempty,
  output logic [AW-1:0] rdusedw
);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [DW-1:0] mem [2**AW];

  ptr_t wbin, wgray;          // write pointer, binary and Gray
  ptr_t rbin, rgray;          // read pointer, binary and Gray

  // ---------------- write domain ----------------
  ptr_t rgray_w1, rgray_w2;   // read pointer synchronised to wrclk
  ptr_t rbin_w;
  logic wr_en;

  always_comb begin
    rbin_w  = gray2bin(rgray_w2);
    wrfull  = (wbin[AW] != rbin_w[AW]) && (wbin[AW-1:0] == rbin_w[AW-1:0]);
    wrusedw = AW'(wbin - rbin_w);
    wr_en   = wrreq && !wrfull;
  end

  always_ff @(posedge wrclk or posedge aclr) begin
    if (aclr) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wrclk) begin
    if (wr_en) mem[wbin[AW-1:0]] <= data;
  end

  // ---------------- read domain ----------------
  ptr_t wgray_r1, wgray_r2;   // write pointer synchronised to rdclk
  ptr_t wbin_r;
  logic rd_en;

  always_comb begin
    wbin_r  = gray2bin(wgray_r2);
    rdempty = (wbin_r == rbin);
    rdusedw = AW'(wbin_r - rbin);
    rd_en   = rdreq && !rdempty;
  end

  always_ff @(posedge rdclk or posedge aclr) begin
    if (aclr) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rdclk or posedge aclr) begin
    if (aclr)       q <= '0;
    else if (rd_en) q <= mem[rbin[AW-1:0]];
  end

  // The write side never counts more words than the FIFO holds.
  a_wr_bound: assert property (@(posedge wrclk) disable iff (aclr)
                               (wbin - rbin_w) <= ptr_t'(2**AW));
  // Only one Gray bit changes per accepted write.
  a_gray_step: assert property (@(posedge wrclk) disable iff (aclr)
                                wr_en |=> $onehot(wgray ^ $past(wgray)));
endmodule
