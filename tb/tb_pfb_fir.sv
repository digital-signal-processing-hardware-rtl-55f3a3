// Testbench for pfb_fir at N=16: random samples on four interleaved
// channels, a sprinkling of blanking flags. A reference model keeps every
// channel's history and evaluates the polyphase sum with its own copy of the
// sinc x Hamming window; outputs are compared once the taps are full.
// Outputs that include a flagged sample must be zero, and one appears.
module tb_pfb_fir;
  localparam int N = 16, P = 4, MUX = 4, DIN_W = 12, DOUT_W = 18, COEF_W = 18;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, zin = 0, sync_out, zout;
  logic signed [DIN_W-1:0] din = 0;
  logic signed [DOUT_W-1:0] dout;
  int checks = 0, failures = 0, nzero = 0;

  pfb_fir #(.N(N), .P(P), .MUX(MUX)) dut (.*);

  function automatic longint w(int i);
    real pi, x, s, h;
    pi = 3.14159265358979;
    x = (real'(i) - P * N / 2.0) / N;
    s = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
    h = 0.54 - 0.46 * $cos(2.0 * pi * i / (P * N));
    return longint'($rtoi(s * h * 131071.0));
  endfunction

  localparam int T = MUX * N * 10;
  logic signed [DIN_W-1:0] xs [T];
  logic zs [T];

  initial begin
    longint acc, e;
    logic anyz;
    repeat (2) @(posedge clk);
    rst <= 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    for (int t = 0; t < T; t++) begin
      xs[t] = DIN_W'($urandom);
      zs[t] = ($urandom % 200) == 0;
      din <= xs[t]; zin <= zs[t];
      @(posedge clk); #1;
      if (t >= MUX * N * (P - 1)) begin
        acc = 0; anyz = 0;
        for (int k = 0; k < P; k++) begin
          acc += longint'(xs[t - k * MUX * N]) * w((t / MUX) % N + (P - 1 - k) * N);
          anyz |= zs[t - k * MUX * N];
        end
        e = acc >>> 12;
        if (e > 131071) e = 131071;
        if (e < -131072) e = -131072;
        if (anyz) begin e = 0; nzero++; end
        checks++;
        if (longint'(dout) != e || zout != anyz) begin
          failures++;
          if (failures < 10) $display("t=%0d dout=%0d exp=%0d", t, dout, e);
        end
      end
    end
    checks++;
    if (nzero == 0) failures++;
    $display("blanked outputs: %0d", nzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
