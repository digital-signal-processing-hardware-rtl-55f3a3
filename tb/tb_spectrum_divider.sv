// Testbench for spectrum_divider with 4 buses, 2 channels per bus and
// 16 bins (4 bins per part). Every input sample carries a unique tag
// (period, bus, channel, bin); each output frame is checked slot by slot:
// slot NBUS*c+i must hold bins of part j of channel c of bus i, all from
// the same input period, in bin order.
module tb_spectrum_divider;
  import omni_pkg::*;
  localparam int NBUS = 4, CH = 2, BINS = 16, SEG = BINS / NBUS, FRAME = CH * BINS, F = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0;
  cplx8_t din [NBUS], dout [NBUS];
  logic sync_out;
  int checks = 0, failures = 0;
  int nfr [NBUS], pos [NBUS];

  spectrum_divider #(.NBUS(NBUS), .CH(CH), .BINS(BINS)) dut (.*);

  function automatic cplx8_t tag(int f, int bus, int p);
    int v; v = (f * NBUS + bus) * FRAME + p;
    return cplx8_t'(16'(v));
  endfunction

  always @(posedge clk) if (!rst) begin
    for (int j = 0; j < NBUS; j++) begin
      if (pos[j] >= 0 && pos[j] < FRAME && nfr[j] >= 1 && nfr[j] <= F - 1) begin
        int s, b, c, i; cplx8_t e;
        s = pos[j] / SEG; b = pos[j] % SEG; c = s / NBUS; i = s % NBUS;
        e = tag(nfr[j] - 1, i, c * BINS + j * SEG + b);
        checks++;
        if (dout[j] !== e) begin
          failures++;
          if (failures < 10) $display("out %0d frame %0d pos %0d got %h exp %h", j, nfr[j]-1, pos[j], dout[j], e);
        end
      end
      if (pos[j] >= 0) pos[j]++;
      if (sync_out) begin nfr[j]++; pos[j] = 0; end
    end
  end

  initial begin
    foreach (nfr[j]) begin nfr[j] = 0; pos[j] = -1; end
    foreach (din[i]) din[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    for (int f = 0; f < F; f++)
      for (int p = 0; p < FRAME; p++) begin
        for (int i = 0; i < NBUS; i++) din[i] <= tag(f, i, p);
        @(posedge clk);
      end
    repeat (4) @(posedge clk);
    checks++;
    if (checks < NBUS * (F - 1) * FRAME) begin failures++; $display("too few checks %0d", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (F * FRAME + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
