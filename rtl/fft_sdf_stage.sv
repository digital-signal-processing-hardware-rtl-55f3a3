// fft_sdf_stage: one radix-2 decimation-in-frequency stage of a streaming
// single-path delay-feedback FFT.
//
// The stage works on blocks of 2*D samples (D = half the butterfly span). For
// the first D samples of a block it stores the input in a D-deep delay line
// and sends out what the line held: the previous block's differences,
// multiplied by the twiddle exp(-j*pi*m/D) for m = 0..D-1. For the second D
// samples it forms the butterfly of the stored sample a and the input b,
// sends out a+b and stores a-b. The output therefore carries, per block,
// the D sums followed by the D twiddled differences, D+1 cycles after the
// input. With a chain of stages D = N/2, N/4, ..., 1 the FFT of each
// N-sample frame comes out in bit-reversed order.
//
// Every output is optionally halved (shift = 1, arithmetic shift right) and
// then saturated to W bits; ovf pulses when saturation was needed. Twiddles
// have TW_W bits with 1.0 = 2^(TW_W-2) and products are truncated. sync_in
// marks the cycle before sample 0 of a frame; sync_out is sync_in delayed by
// the stage latency, D+1 cycles.
//
// From the design: a fixed data width (18 bits) carried through every stage
// and a per-stage "shift by one" decided by the FFT shift schedule. The
// stage structure (radix-2 SDF) is this design's choice.
module fft_sdf_stage #(
  parameter int unsigned D    = 512,  // butterfly half-span
  parameter int unsigned W    = 18,   // data width (real and imaginary)
  parameter int unsigned TW_W = 18    // twiddle width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync_in,
  input  logic signed [W-1:0] din_re,
  input  logic signed [W-1:0] din_im,
  input  logic                shift,
  output logic                sync_out,
  output logic signed [W-1:0] dout_re,
  output logic signed [W-1:0] dout_im,
  output logic                ovf
);
  localparam int unsigned CW  = $clog2(2 * D);
  localparam int unsigned MW  = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned DW  = W + 1;                 // butterfly result width
  localparam int unsigned PW  = DW + TW_W;             // product width
  localparam int unsigned ONE = 1 << (TW_W - 2);

  typedef logic signed [TW_W-1:0] tw_t;
  tw_t tw_re [D];
  tw_t tw_im [D];
  initial begin
    for (int unsigned m = 0; m < D; m++) begin
      tw_re[m] = tw_t'($rtoi($floor( $cos(3.14159265358979 * m / D) * ONE + 0.5)));
      tw_im[m] = tw_t'($rtoi($floor(-$sin(3.14159265358979 * m / D) * ONE + 0.5)));
    end
  end

  logic signed [DW-1:0] dl_re [D];
  logic signed [DW-1:0] dl_im [D];
  logic [CW-1:0]        cnt;
  logic                 second;     // second half of the block: butterfly
  logic [MW-1:0]        m;          // index within the half block
  logic signed [DW-1:0] a_re, a_im, res_re, res_im, st_re, st_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    second = cnt[CW-1];
    m      = MW'(cnt) & MW'(D - 1);
    a_re   = dl_re[m];
    a_im   = dl_im[m];
    p_re   = PW'(a_re) * PW'(tw_re[m]) - PW'(a_im) * PW'(tw_im[m]);
    p_im   = PW'(a_re) * PW'(tw_im[m]) + PW'(a_im) * PW'(tw_re[m]);
    if (second) begin
      res_re = a_re + DW'(din_re);
      res_im = a_im + DW'(din_im);
      st_re  = a_re - DW'(din_re);
      st_im  = a_im - DW'(din_im);
    end else begin
      res_re = DW'(p_re >>> (TW_W - 2));
      res_im = DW'(p_im >>> (TW_W - 2));
      st_re  = DW'(din_re);
      st_im  = DW'(din_im);
    end
  end

  // optional halving and saturation back to W bits
  localparam logic signed [DW-1:0] MAXV = DW'((1 << (W - 1)) - 1);
  localparam logic signed [DW-1:0] MINV = -DW'(1 << (W - 1));
  function automatic logic signed [W:0] scale(input logic signed [DW-1:0] v, input logic sh);
    logic signed [DW-1:0] s;
    s = sh ? (v >>> 1) : v;
    if (s > MAXV)      return {1'b1, 1'b0, {(W-1){1'b1}}};
    else if (s < MINV) return {1'b1, 1'b1, {(W-1){1'b0}}};
    else                                     return {1'b0, s[W-1:0]};
  endfunction

  logic signed [W:0] o_re, o_im;
  always_comb begin
    o_re = scale(res_re, shift);
    o_im = scale(res_im, shift);
  end

  logic [D:0] sync_dly;

  always_ff @(posedge clk) begin
    dl_re[m] <= st_re;
    dl_im[m] <= st_im;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      sync_dly <= '0;
      dout_re  <= '0;
      dout_im  <= '0;
      ovf      <= 1'b0;
    end else begin
      cnt      <= sync_in ? '0 : cnt + 1;
      sync_dly <= {sync_dly[D-1:0], sync_in};
      dout_re  <= o_re[W-1:0];
      dout_im  <= o_im[W-1:0];
      ovf      <= o_re[W] | o_im[W];
    end
  end
  assign sync_out = sync_dly[D];
endmodule
