// Testbench for fft_real2x at N=64. Feeds frames of random real samples on
// both inputs, computes both DFTs in floating point and compares the
// A-then-B output frame bin by bin (tolerance 8 LSB for rounding in the
// stages). Also checks the sync latency (2N + log2 N cycles) and that a loud
// frame with no shifts raises the overflow flag while the scaled frames do not.
module tb_fft_real2x;
  localparam int N = 64, S = 6, W = 18, F = 6;
  localparam int LAT = 2 * N + S;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, sync_out, ovf;
  logic signed [W-1:0] a_in = 0, b_in = 0, dout_re, dout_im;
  logic [S-1:0] shift_sched = '1;
  int checks = 0, failures = 0, ovf_seen_loud = 0, ovf_seen_quiet = 0;
  real xa [F][N], xb [F][N];
  int nsync = 0, ocnt = -1, cyc = 0, sync_in_cyc = -1, lat_checked = 0;

  fft_real2x #(.N(N), .W(W)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rabs(input real x); return (x < 0.0) ? -x : x; endfunction

  function automatic void ref_bin(input int f, input int k, input bit isb, output real re, output real im);
    re = 0; im = 0;
    for (int n = 0; n < N; n++) begin
      real x, ph;
      x  = isb ? xb[f][n] : xa[f][n];
      ph = -2.0 * 3.14159265358979 * n * k / N;
      re += x * $cos(ph);
      im += x * $sin(ph);
    end
    re = re / N; im = im / N;   // all six stages halve
  endfunction

  always @(posedge clk) if (!rst) begin
    if (ocnt >= 0 && ocnt < N && nsync >= 1 && nsync - 1 < F) begin
      real er, ei;
      int f;
      f = nsync - 1;
      ref_bin(f, ocnt % (N / 2), ocnt >= N / 2, er, ei);
      checks++;
      if (rabs(real'(dout_re) - er) > 8.0 || rabs(real'(dout_im) - ei) > 8.0) begin
        failures++;
        if (failures < 10) $display("f=%0d o=%0d got %0d,%0d exp %f,%f", f, ocnt, dout_re, dout_im, er, ei);
      end
    end
    if (ocnt >= 0) ocnt++;
    if (sync_out) begin
      nsync++; ocnt = 0;
      if (!lat_checked && sync_in_cyc >= 0 && nsync == 1) begin
        checks++; lat_checked = 1;
        if (cyc - sync_in_cyc != LAT + 1) begin failures++; $display("latency %0d", cyc - sync_in_cyc); end
      end
    end
    if (ovf && nsync >= 1) begin
      if (shift_sched == 0) ovf_seen_loud++; else ovf_seen_quiet++;
    end
  end

  initial begin
    for (int f = 0; f < F; f++)
      for (int n = 0; n < N; n++) begin
        xa[f][n] = real'($signed(14'($urandom)));
        xb[f][n] = real'($signed(14'($urandom)));
      end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < F; f++) begin
      sync_in <= 1;
      if (f == 0) sync_in_cyc = cyc;
      @(posedge clk); sync_in <= 0;
      for (int n = 0; n < N; n++) begin
        a_in <= W'($rtoi(xa[f][n])); b_in <= W'($rtoi(xb[f][n]));
        if (n < N - 1) @(posedge clk);
      end
    end
    // loud frame with no halving: must saturate somewhere
    @(posedge clk); a_in <= 0; b_in <= 0;
    repeat (3 * N) @(posedge clk);
    shift_sched <= '0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    for (int n = 0; n < N; n++) begin a_in <= 18'sh1ffff; b_in <= -18'sh1ffff; @(posedge clk); end
    repeat (3 * N) @(posedge clk);
    checks++;
    if (ovf_seen_loud == 0 || ovf_seen_quiet != 0) begin failures++; $display("ovf loud %0d quiet %0d", ovf_seen_loud, ovf_seen_quiet); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
