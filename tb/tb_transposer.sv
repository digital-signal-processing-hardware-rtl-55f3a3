// Testbench for transposer with 8 channels, 4 bins and 4 spectra per block,
// against the QDR SRAM model. Inputs carry unique tags; each output block
// must list, bin by bin and channel by channel, that channel's T samples of
// the previous input block, with sync_out one cycle before the block.
module tb_transposer;
  import omni_pkg::*;
  localparam int NS = 2, CHN = 8, BINS = 4, T = 4, FRAME = CHN * BINS, BLK = FRAME * T, NB = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, sync_out, out_valid;
  cplx8_t din [NS], dout [NS];
  qdr_req_t qdr_req; qdr_rsp_t qdr_rsp;
  int checks = 0, failures = 0, nblk = 0, pos = -1, nvalid = 0;

  transposer #(.NS(NS), .CHN(CHN), .BINS(BINS), .T(T)) dut (.*);
  qdr_sram_model #(.DEPTH_W(12)) u_qdr (.clk, .qdr_req, .qdr_rsp);

  function automatic cplx8_t tag(int b, int s, int t, int ch, int bin);
    return cplx8_t'(16'((((b * NS + s) * T + t) * CHN + ch) * BINS + bin));
  endfunction

  always @(posedge clk) if (!rst) begin
    if (pos >= 0 && pos < BLK && nblk >= 1 && nblk <= NB) begin
      int t, ch, bin;
      t = pos % T; ch = (pos / T) % CHN; bin = pos / (T * CHN);
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (dout[s] !== tag(nblk - 1, s, t, ch, bin) || !out_valid) begin
          failures++;
          if (failures < 10) $display("blk %0d pos %0d s %0d got %h exp %h v %0d", nblk-1, pos, s, dout[s], tag(nblk-1, s, t, ch, bin), out_valid);
        end
      end
    end
    if (pos >= 0) pos++;
    if (sync_out) begin nblk++; pos = 0; end
  end

  initial begin
    foreach (din[s]) din[s] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int t = 0; t < T; t++) begin
        sync_in <= 1; @(posedge clk); sync_in <= 0;
        for (int p = 0; p < FRAME; p++) begin
          for (int s = 0; s < NS; s++) din[s] <= tag(b, s, t, p / BINS, p % BINS);
          if (p < FRAME - 1) @(posedge clk);
        end
      end
    @(posedge clk);
    repeat (BLK + 20) @(posedge clk);
    checks++;
    if (nblk != NB + 1 || checks != NB * BLK * NS + 1) begin failures++; $display("blocks out %0d", nblk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NB * BLK * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
