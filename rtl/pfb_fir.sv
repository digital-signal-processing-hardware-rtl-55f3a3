// pfb_fir: polyphase FIR front end (windowing) for one ADC bus.
//
// The bus carries MUX channels interleaved sample by sample. For every
// channel the block forms, at each sample index n of an N-point window,
//     y(n) = sum_{k=0}^{P-1} x_k(n) * w(n + (P-1-k)*N)
// where x_k(n) is the sample k windows older than the newest one (x_0 the
// newest). w is a P*N-point window: a sinc spanning P lobes, times a Hamming
// window of the same length. Because the channels are interleaved, one
// window of one channel spans MUX*N cycles on the bus, so each tap delay line
// is MUX*N samples long instead of N; one sample enters and one leaves
// every cycle.
//
// Blanking: every input sample carries a zero flag (set by the swapper while
// an analog switch settles). The flags travel down the same delay lines, and
// an output is forced to zero if any of the P samples it is made of was
// flagged, so a flagged input blanks all P outputs it touches.
//
// Coefficients are COEF_W-bit signed with 1.0 = 2^(COEF_W-1)-1, computed at
// start-up into a ROM indexed [tap][n]. The product sum is shifted right by
// COEF_W-DOUT_W+DIN_W (12 at the defaults, so a full-scale input gives about
// half of output full scale) and saturated to DOUT_W bits.
//
// Timing: the cycle after sync_in carries sample 0 of channel 0 (the usual
// sync convention of this design). Output is registered: dout, zout and
// sync_out appear one cycle after the input.
//
// From the design: P = 4 taps, N = 1024, taps spaced by MUX*N for the 4:1
// multiplexing, sinc x Hamming window, blanking of all outputs a flagged
// sample reaches. This design's choices: coefficient width, output scaling
// and saturation, and a sinc argument running from -P/2 to +P/2 over the
// P*N points (P lobes, as in the usual polyphase filter bank window).
module pfb_fir #(
  parameter int unsigned N      = 1024, // FFT window length
  parameter int unsigned P      = 4,    // taps
  parameter int unsigned MUX    = 4,    // channels interleaved on the bus
  parameter int unsigned DIN_W  = 12,
  parameter int unsigned DOUT_W = 18,
  parameter int unsigned COEF_W = 18
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sync_in,
  input  logic signed [DIN_W-1:0]  din,
  input  logic                     zin,
  output logic                     sync_out,
  output logic signed [DOUT_W-1:0] dout,
  output logic                     zout
);
  localparam int unsigned L     = MUX * N;          // delay per tap
  localparam int unsigned AW    = $clog2(L);
  localparam int unsigned NW    = $clog2(N);
  localparam int unsigned SHIFT = COEF_W - DOUT_W + DIN_W;
  localparam int unsigned ACC_W = DIN_W + COEF_W + $clog2(P) + 1;

  typedef logic signed [COEF_W-1:0] coef_t;

  // window value at point i of the P*N-point window
  function automatic coef_t win_coef(input int unsigned i);
    real pi, x, s, h;
    pi = 3.14159265358979;
    x  = (real'(i) - real'(P * N) / 2.0) / real'(N);
    s  = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
    h  = 0.54 - 0.46 * $cos(2.0 * pi * real'(i) / real'(P * N));
    return coef_t'($rtoi(s * h * real'((1 << (COEF_W - 1)) - 1)));
  endfunction

  // P-1 delay lines of L samples (data plus blanking flag), one memory each,
  // and one coefficient ROM per tap
  logic [AW-1:0]           addr;
  logic signed [DIN_W-1:0] tap   [P];
  logic                    tap_z [P];
  coef_t                   cf    [P];
  logic [NW-1:0]           n_idx;

  always_comb n_idx = NW'(addr / AW'(MUX));

  for (genvar k = 0; k < P; k++) begin : g_tap
    coef_t rom [N];
    initial begin
      for (int unsigned n = 0; n < N; n++)
        rom[n] = win_coef(n + (P - 1 - k) * N);
    end
    always_comb cf[k] = rom[n_idx];
    if (k == 0) begin : g_in
      always_comb begin
        tap[0]   = din;
        tap_z[0] = zin;
      end
    end else begin : g_dly
      logic [DIN_W:0] mem [L];
      always_ff @(posedge clk) mem[addr] <= {tap_z[k-1], tap[k-1]};
      always_comb {tap_z[k], tap[k]} = mem[addr];
    end
  end

  logic signed [ACC_W-1:0] acc;
  logic                    any_z;
  always_comb begin
    acc   = '0;
    any_z = 1'b0;
    for (int k = 0; k < P; k++) begin
      acc   = acc + ACC_W'(tap[k] * cf[k]);
      any_z = any_z | tap_z[k];
    end
  end

  localparam logic signed [DOUT_W-1:0] MAXV = {1'b0, {(DOUT_W-1){1'b1}}};
  localparam logic signed [DOUT_W-1:0] MINV = {1'b1, {(DOUT_W-1){1'b0}}};
  logic signed [ACC_W-1:0] scaled;
  always_comb scaled = acc >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr     <= '0;
      sync_out <= 1'b0;
      dout     <= '0;
      zout     <= 1'b0;
    end else begin
      addr     <= (sync_in || addr == AW'(L - 1)) ? '0 : addr + 1;
      sync_out <= sync_in;
      zout     <= any_z;
      if (any_z)                           dout <= '0;
      else if (scaled > ACC_W'(MAXV))      dout <= MAXV;
      else if (scaled < ACC_W'(MINV))      dout <= MINV;
      else                                 dout <= DOUT_W'(scaled);
    end
  end
endmodule
