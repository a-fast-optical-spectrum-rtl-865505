// word_sync -- carries a quasi-static word into another clock domain.
//
// The source holds src_word stable and flips src_tgl once the word is valid
// (as mcbsp_rx does). Here the toggle passes two synchronizer flip-flops;
// when the synchronized toggle differs from its previous value, src_word,
// which has been stable for at least two destination clocks by then, is
// copied into dst_word. dst_word thus changes three to four clk edges
// after the toggle flips. Helper of the acquisition top level.
//
// Interface: clk, rst_n (asynchronous, active low), src_word, src_tgl,
// dst_word (reset value RESET_WORD).
module word_sync #(
  parameter int unsigned   W          = 16,
  parameter logic [W-1:0] RESET_WORD = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] src_word,
  input  logic         src_tgl,
  output logic [W-1:0] dst_word
);
  logic [2:0] tgl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl_q    <= '0;
      dst_word <= RESET_WORD;
    end else begin
      tgl_q <= {tgl_q[1:0], src_tgl};
      if (tgl_q[2] != tgl_q[1]) dst_word <= src_word;
    end
  end
endmodule
