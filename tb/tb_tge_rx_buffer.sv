// Testbench for tge_rx_buffer with 32-sample windows and a 16-word FIFO.
// Phase 1 feeds numbered words with random gaps, slower on average than the
// correlator, and checks that every window is either a complete run of the
// next 8 words in order (valid) or all ones (junk), that both kinds occur and
// that nothing is lost (the first window after reset is junk without an
// underflow pulse). Phase 2 floods the FIFO and checks the overflow flag.
module tb_tge_rx_buffer;
  import omni_pkg::*;
  localparam int WIN = 32, DEPTH = 16, NW = 400;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  tge_word_t rx;
  logic rx_valid = 0; logic [63:0] rx_data = '0;
  assign rx = '{valid: rx_valid, eof: 1'b0, data: rx_data};
  logic sync_out, out_valid, underflow, overflow;
  cplx8_t dout;
  bit judge = 1;
  int checks = 0, failures = 0, nvalid = 0, njunk = 0, pos = -1, next_word = 0, nunder = 0;
  logic [15:0] got [WIN]; logic gv [WIN];

  tge_rx_buffer #(.WIN(WIN), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [63:0] mkword(int n);
    return {16'(4*n), 16'(4*n+1), 16'(4*n+2), 16'(4*n+3)};
  endfunction

  always @(posedge clk) if (!rst) begin
    if (underflow) nunder++;
    if (pos >= 0 && pos < WIN) begin got[pos] = dout; gv[pos] = out_valid; end
    if (pos >= 0) pos++;
    if (pos == WIN && judge) begin
      // judge a finished window
      checks++;
      if (gv[0]) begin
        for (int i = 0; i < WIN; i++)
          if (!gv[i] || got[i] != 16'(4 * next_word + i)) begin
            failures++; $display("window word %0d sample %0d got %h", next_word, i, got[i]); break;
          end
        next_word += WIN / 4; nvalid++;
      end else begin
        for (int i = 0; i < WIN; i++)
          if (gv[i] || got[i] != 16'hffff) begin failures++; $display("bad junk"); break; end
        njunk++;
      end
    end
    if (sync_out) pos = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NW; n++) begin
      int gap;
      gap = 2 + $urandom % 8;
      if (gap > 0) begin rx_valid <= 0; repeat (gap) @(posedge clk); end
      rx_valid <= 1; rx_data <= mkword(n);
      @(posedge clk);
    end
    rx_valid <= 0;
    repeat (20 * WIN) @(posedge clk);
    checks++;
    if (next_word != NW || nvalid == 0 || njunk == 0 || overflow || nunder == 0 || nunder > njunk + 1) begin
      failures++; $display("nunder %0d words %0d valid %0d junk %0d ovf %0d", nunder, next_word, nvalid, njunk, overflow);
    end
    judge = 0;
    // flood: back-to-back words overflow the FIFO
    for (int n = 0; n < 4 * DEPTH; n++) begin rx_valid <= 1; rx_data <= '0; @(posedge clk); end
    rx_valid <= 0;
    @(posedge clk);
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    $display("valid windows %0d junk windows %0d", nvalid, njunk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NW * 10 + 30 * WIN) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
