// shift_truncate: per-frequency-bin gain and bit-width reduction after the FFT.
//
// A 2^(CNT_W)-cycle counter, cleared by sync, numbers the samples of a
// period: its upper bits are the channel on the bus, its low BIN_W bits the
// frequency bin. The bin addresses a shift RAM that software may rewrite at
// any time (sw_* port); the value s read there selects, through a mux, the
// input shifted left by s. The DIN_W-bit real and imaginary parts are then cut
// to their top DOUT_W bits; a value that the shift pushed past the output
// range is clamped to the largest value of its own sign, so the sign is kept.
//
// Timing: sync_in precedes sample 0 of a period; the RAM read and the
// shifted output are each registered, so dout and sync_out come 2 cycles
// after their input. clip pulses for a saturated output.
//
// From the design: the counter width log2(FFT input size)+2 (12 bits), bin =
// low 9 bits, channel = top 3 bits, the shift RAM writable by software, the
// mux of shifted copies, 18+18 in and 8+8 out, sign-preserving. This design's
// choices: the shift range 0..2^SH_W-1, the clamping and the 2-cycle latency.
module shift_truncate #(
  parameter int unsigned CNT_W  = 12,  // log2(FFT size) + 2
  parameter int unsigned BIN_W  = 9,   // log2(bins per spectrum)
  parameter int unsigned DIN_W  = 18,
  parameter int unsigned DOUT_W = 8,
  parameter int unsigned SH_W   = 4    // width of a shift value
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sync_in,
  input  logic signed [DIN_W-1:0]  din_re,
  input  logic signed [DIN_W-1:0]  din_im,
  input  logic                     sw_we,
  input  logic [BIN_W-1:0]         sw_addr,
  input  logic [SH_W-1:0]          sw_wdata,
  output logic                     sync_out,
  output logic signed [DOUT_W-1:0] dout_re,
  output logic signed [DOUT_W-1:0] dout_im,
  output logic                     clip,
  output logic [CNT_W-1:0]         idx     // counter value of the current output
);
  localparam int unsigned XW = DIN_W + (1 << SH_W);   // wide enough for any shift

  logic [SH_W-1:0]         shift_ram [1 << BIN_W];
  logic [CNT_W-1:0]        cnt;
  logic [SH_W-1:0]         sh;
  logic signed [DIN_W-1:0] d1_re, d1_im;
  logic                    sync1;
  logic [CNT_W-1:0]        cnt1;

  always_ff @(posedge clk) begin
    if (sw_we) shift_ram[sw_addr] <= sw_wdata;
    sh <= shift_ram[cnt[BIN_W-1:0]];
  end

  function automatic logic [DOUT_W:0] cut(input logic signed [DIN_W-1:0] v, input logic [SH_W-1:0] s);
    logic signed [XW-1:0] x;
    logic signed [XW-1:0] hi;
    x  = XW'(v) <<< s;
    hi = x >>> (DIN_W - DOUT_W);
    if (hi > XW'(signed'({1'b0, {(DOUT_W-1){1'b1}}})))      return {1'b1, 1'b0, {(DOUT_W-1){1'b1}}};
    else if (hi < XW'(signed'({1'b1, {(DOUT_W-1){1'b0}}}))) return {1'b1, 1'b1, {(DOUT_W-1){1'b0}}};
    else                                                   return {1'b0, hi[DOUT_W-1:0]};
  endfunction

  logic [DOUT_W:0] c_re, c_im;
  always_comb begin
    c_re = cut(d1_re, sh);
    c_im = cut(d1_im, sh);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      sync1    <= 1'b0;
      sync_out <= 1'b0;
      d1_re    <= '0;
      d1_im    <= '0;
      dout_re  <= '0;
      dout_im  <= '0;
      clip     <= 1'b0;
      cnt1     <= '0;
      idx      <= '0;
    end else begin
      // cnt numbers the sample arriving now
      cnt      <= sync_in ? '0 : cnt + 1;
      d1_re    <= din_re;
      d1_im    <= din_im;
      sync1    <= sync_in;
      cnt1     <= cnt;
      sync_out <= sync1;
      dout_re  <= c_re[DOUT_W-1:0];
      dout_im  <= c_im[DOUT_W-1:0];
      clip     <= c_re[DOUT_W] | c_im[DOUT_W];
      idx      <= cnt1;
    end
  end
endmodule
