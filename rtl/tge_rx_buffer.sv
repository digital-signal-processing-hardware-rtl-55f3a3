// tge_rx_buffer: turns the bursty word stream of a 10GbE receive core into
// back-to-back correlator windows that are either all valid or all junk.
//
// Valid 64-bit words from the link go into a FIFO as they come. A counter
// that wraps every WIN cycles marks the windows the cross-correlator works
// on. At each wrap the FIFO is checked: if it holds a whole window (WIN/4
// words) that window is sent, one 16-bit sample per cycle (top 16 bits of a
// word first), with out_valid high; otherwise a window of all-ones junk is
// sent with out_valid low and nothing is taken from the FIFO. So the buffer
// rides out a link that is slower than the correlator (it idles on junk
// windows) but not one that is faster: if the FIFO is full an arriving word
// is dropped and the sticky overflow flag is set.
//
// Timing: sync_out is high one cycle before the first sample of every window
// and drives the cross-correlator. underflow pulses once per junk window.
//
// From the design: a FIFO fed with the valid words, a counter synchronised
// to the correlator overflowing once per window, the all-or-nothing choice
// at each overflow, all-ones junk with the valid line low, no protection
// against overflow. This design's choices: FIFO depth, sample order in a
// word, the free-running window counter and the flags.
//
// Unused on purpose: rx.eof. Windows are counted in words, so packet
// boundaries do not matter here.
module tge_rx_buffer
  import omni_pkg::*;
#(
  parameter int unsigned WIN   = 2048,  // samples per correlator window
  parameter int unsigned DEPTH = 2048   // FIFO depth in 64-bit words
) (
  input  logic      clk,
  input  logic      rst,
  input  tge_word_t rx,
  output logic      sync_out,
  output logic      out_valid,
  output cplx8_t    dout,
  output logic      underflow,
  output logic      overflow
);
  localparam int unsigned CW  = $clog2(WIN);
  localparam int unsigned FW  = $clog2(DEPTH);
  localparam int unsigned WPW = WIN / 4;       // words per window

  logic [TGE_DW-1:0] fifo [DEPTH];
  logic [FW-1:0]     wptr, rptr;
  logic [FW:0]       count;
  logic [CW-1:0]     cnt;
  logic              win_valid;
  logic              push, pop;
  logic [TGE_DW-1:0] word;     // word the current sample comes from
  logic [TGE_DW-1:0] cur;      // word popped at the start of this group of 4

  always_comb begin
    push = rx.valid && (count != (FW+1)'(DEPTH));
    pop  = win_valid && (cnt[1:0] == 2'd0);
    word = (cnt[1:0] == 2'd0) ? fifo[rptr] : cur;
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wptr] <= rx.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      cnt       <= '0;
      win_valid <= 1'b0;
      sync_out  <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
      cur       <= '0;
      underflow <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (push) wptr <= (wptr == FW'(DEPTH - 1)) ? '0 : wptr + 1;
      if (pop)  rptr <= (rptr == FW'(DEPTH - 1)) ? '0 : rptr + 1;
      count <= count + (FW+1)'(push) - (FW+1)'(pop);
      if (rx.valid && !push) overflow <= 1'b1;

      cnt       <= cnt + 1;
      sync_out  <= (cnt == CW'(WIN - 1));
      underflow <= 1'b0;
      if (cnt == CW'(WIN - 1)) begin
        win_valid <= (count >= (FW+1)'(WPW));
        underflow <= (count < (FW+1)'(WPW));
      end
      out_valid <= win_valid;
      cur       <= word;
      dout      <= win_valid ? cplx8_t'(word[TGE_DW-1-16*cnt[1:0] -: 16]) : '1;
    end
  end
endmodule
