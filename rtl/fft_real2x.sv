// fft_real2x: N-point FFT of two real input streams sharing one complex
// pipeline, producing one complex output stream.
//
// Each cycle one real sample of stream A and one of stream B enter; they
// are packed as z = a + j*b and sent through log2(N) radix-2 SDF stages
// (fft_sdf_stage), stage s halving its result when shift_sched[s] is set.
// The pipeline emits Z(k) in bit-reversed order; a double buffer writes
// each value at its natural index while the previous frame is read out.
// Because a and b are real, their spectra follow from Z alone:
//     A(k) = (Z(k) + conj Z(N-k)) / 2,   B(k) = (Z(k) - conj Z(N-k)) / 2j
// so each read cycle fetches Z(k) and Z(N-k) together. Only the non-negative
// half of each spectrum is kept (the other half is its mirror), so every
// N-cycle input frame (N samples of A and N of B) gives an N-cycle output
// frame: A(0..N/2-1) followed by B(0..N/2-1). Two real input buses thus
// become one complex output bus carrying twice as many channels.
//
// Timing: frames follow each other back to back; sync_in (the cycle before
// sample 0 of a frame) need not come every frame, the counters run freely
// between syncs. sync_out precedes bin 0 of A in the matching output frame
// by one cycle and comes 2N + log2(N) + 1 cycles after sync_in. ovf is the OR of the stage overflow pulses (a saturation happened).
//
// From the design: 2^10 points, 18 bits carried through every stage, a
// shift schedule read from a software register, real input giving N/2
// complex points per N real points and two input buses merged into one
// output bus. The packing of two real streams into one complex FFT, the
// output order (A block then B block) and the halving in the separation
// are this design's choices.
module fft_real2x #(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 18
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sync_in,
  input  logic signed [W-1:0]        a_in,
  input  logic signed [W-1:0]        b_in,
  input  logic [$clog2(N)-1:0]       shift_sched,  // bit s: halve after stage s
  output logic                       sync_out,
  output logic signed [W-1:0]        dout_re,
  output logic signed [W-1:0]        dout_im,
  output logic                       ovf
);
  localparam int unsigned S  = $clog2(N);
  localparam int unsigned AW = S;

  logic              st_sync [S+1];
  logic signed [W-1:0] st_re [S+1];
  logic signed [W-1:0] st_im [S+1];
  logic [S-1:0]      st_ovf;

  assign st_sync[0] = sync_in;
  assign st_re[0]   = a_in;
  assign st_im[0]   = b_in;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_sdf_stage #(.D(N >> (s + 1)), .W(W)) u_stage (
      .clk, .rst,
      .sync_in (st_sync[s]),
      .din_re  (st_re[s]),
      .din_im  (st_im[s]),
      .shift   (shift_sched[s]),
      .sync_out(st_sync[s+1]),
      .dout_re (st_re[s+1]),
      .dout_im (st_im[s+1]),
      .ovf     (st_ovf[s])
    );
  end

  // bit-reversed to natural order, double buffered
  logic signed [W-1:0] zb_re [2][N];
  logic signed [W-1:0] zb_im [2][N];
  logic [AW-1:0]       wcnt, rcnt;
  logic                bank;
  logic                pend;   // a synced frame is being written
  logic [AW-1:0]       wrev;

  always_comb begin
    for (int i = 0; i < S; i++) wrev[i] = wcnt[S-1-i];
  end

  always_ff @(posedge clk) begin
    zb_re[bank][wrev] <= st_re[S];
    zb_im[bank][wrev] <= st_im[S];
  end

  // read side: bins k and N-k of the frame in bank ~bank
  logic [AW-1:0]        k, nk;
  logic                 is_b;
  logic signed [W-1:0]  zr, zi, wr, wi;
  logic signed [W:0]    sum_re, sum_im;
  always_comb begin
    is_b   = rcnt[AW-1];
    k      = {1'b0, rcnt[AW-2:0]};
    nk     = AW'(0) - k;
    zr     = zb_re[~bank][k];
    zi     = zb_im[~bank][k];
    wr     = zb_re[~bank][nk];
    wi     = zb_im[~bank][nk];
    if (!is_b) begin
      sum_re = (W+1)'(zr) + (W+1)'(wr);
      sum_im = (W+1)'(zi) - (W+1)'(wi);
    end else begin
      sum_re = (W+1)'(zi) + (W+1)'(wi);
      sum_im = (W+1)'(wr) - (W+1)'(zr);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt     <= '0;
      rcnt     <= '0;
      bank     <= 1'b0;
      sync_out <= 1'b0;
      pend     <= 1'b0;
      dout_re  <= '0;
      dout_im  <= '0;
      ovf      <= 1'b0;
    end else begin
      ovf      <= |st_ovf;
      sync_out <= 1'b0;
      dout_re  <= W'(sum_re >>> 1);
      dout_im  <= W'(sum_im >>> 1);
      rcnt     <= rcnt + 1;
      wcnt     <= wcnt + 1;
      if (wcnt == AW'(N - 1)) begin
        bank     <= ~bank;
        rcnt     <= '0;
        sync_out <= pend;
        pend     <= 1'b0;
      end
      if (st_sync[S]) begin
        wcnt     <= '0;
        pend     <= 1'b1;
      end
    end
  end
endmodule
