// Testbench for xcorr with 6 channels and 64 spectra per window (the full
// internal accumulation, so the accumulator width is exercised). Windows
// run back to back with random data, random valid marks, and one window of
// all -128 (the largest possible sums). Every baseline is compared in order
// with sums computed here, together with its (i,j) label, the window's valid
// mark and the last-baseline flag; the count per window is NCH*(NCH+1)/2.
module tb_xcorr;
  import omni_pkg::*;
  localparam int NCH = 6, NT = 64, ACC_W = 23, NWIN = 8, NBL = NCH * (NCH + 1) / 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, in_valid = 0;
  cplx8_t din = '0;
  logic out_valid, out_win_valid, out_last;
  logic [2:0] bl_i, bl_j;
  logic signed [ACC_W-1:0] dout_re, dout_im;
  int checks = 0, failures = 0, nout = 0;

  xcorr #(.NCH(NCH), .NT(NT), .ACC_W(ACC_W)) dut (.*);

  typedef struct { int i, j; longint re, im; bit wv, last; } bl_t;
  bl_t expq [$];

  always @(posedge clk) if (!rst && out_valid) begin
    bl_t e;
    e = expq.pop_front();
    checks++;
    nout++;
    if (bl_i != 3'(e.i) || bl_j != 3'(e.j) || longint'(dout_re) != e.re || longint'(dout_im) != e.im
        || out_win_valid != e.wv || out_last != e.last) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) got %0d,%0d exp (%0d,%0d) %0d,%0d", bl_i, bl_j, dout_re, dout_im, e.i, e.j, e.re, e.im);
    end
  end

  initial begin
    cplx8_t x [NCH][NT];
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < NWIN; w++) begin
      bit v;
      v = (w == 3) ? 1'b0 : 1'b1;
      for (int c = 0; c < NCH; c++)
        for (int t = 0; t < NT; t++)
          x[c][t] = (w == 5) ? cplx8_t'({8'h80, 8'h80}) : cplx8_t'($urandom);
      for (int j = 0; j < NCH; j++)
        for (int i = 0; i <= j; i++) begin
          bl_t e;
          e.i = i; e.j = j; e.re = 0; e.im = 0; e.wv = v; e.last = (j == NCH - 1 && i == j);
          for (int t = 0; t < NT; t++) begin
            e.re += longint'(x[i][t].re) * x[j][t].re + longint'(x[i][t].im) * x[j][t].im;
            e.im += longint'(x[i][t].im) * x[j][t].re - longint'(x[i][t].re) * x[j][t].im;
          end
          expq.push_back(e);
        end
      sync_in <= 1; @(posedge clk); sync_in <= 0;
      for (int c = 0; c < NCH; c++)
        for (int t = 0; t < NT; t++) begin
          din <= x[c][t]; in_valid <= v;
          if (!(c == NCH - 1 && t == NT - 1)) @(posedge clk);
        end
    end
    @(posedge clk);
    repeat (NCH + 5) @(posedge clk);
    checks++;
    if (nout != NWIN * NBL || expq.size() != 0) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NWIN * NCH * NT + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
