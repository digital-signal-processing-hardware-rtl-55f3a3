// time_halver: halves the time data of two filtered buses and merges them
// into one bus (64-channel variant of the F-engine).
//
// Each polyphase-filter output bus carries frames of MUX channels x N
// samples (BLK = MUX*N cycles). Bus b is delayed by one frame in a BLK-word
// circular memory. A multiplexer then takes bus a during even frames and the
// delayed bus b during odd frames. The output therefore carries frame 2k of
// bus a followed by frame 2k of bus b: both come from the same time span,
// and frames 2k+1 of both buses are thrown away. The FFT that follows sees
// 2*MUX channels per bus instead of MUX, at the same data rate.
//
// Timing: the first sync_in after reset precedes sample 0 of an even frame;
// from then on frames are counted, and later syncs (one per frame in the
// F-engine) are passed on but do not touch the count, so the parity keeps
// alternating. dout and sync_out are registered, 1 cycle after din.
// sel_b is high while the output carries bus b (delayed).
//
// From the design: halving right after the window filter, the alternating
// multiplexer, the one-window delay on one bus, blocks four times the FFT
// length because of the 4-to-1 multiplexing. This design's choices: which
// bus is delayed, the even/odd phase from sync and the 1-cycle latency.
module time_halver #(
  parameter int unsigned N   = 1024,  // FFT window length
  parameter int unsigned MUX = 4,     // channels interleaved on each bus
  parameter int unsigned W   = 18     // sample width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync_in,
  input  logic signed [W-1:0] din_a,
  input  logic signed [W-1:0] din_b,
  output logic                sync_out,
  output logic signed [W-1:0] dout,
  output logic                sel_b
);
  localparam int unsigned BLK = MUX * N;
  localparam int unsigned AW  = $clog2(BLK);

  logic signed [W-1:0] dly [BLK];
  logic [AW-1:0]       pos;      // position in the frame
  logic                odd;      // current frame is odd
  logic signed [W-1:0] b_old;    // bus b one frame ago
  logic                seen;     // first sync has arrived

  always_comb b_old = dly[pos];

  always_ff @(posedge clk) dly[pos] <= din_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos      <= '0;
      odd      <= 1'b0;
      seen     <= 1'b0;
      sync_out <= 1'b0;
      dout     <= '0;
      sel_b    <= 1'b0;
    end else begin
      if (sync_in && !seen) begin
        pos  <= '0;
        odd  <= 1'b0;
        seen <= 1'b1;
      end else begin
        pos <= (pos == AW'(BLK - 1)) ? '0 : pos + 1;
        if (pos == AW'(BLK - 1)) odd <= ~odd;
      end
      sync_out <= sync_in;
      sel_b    <= odd;
      dout     <= odd ? b_old : din_a;
    end
  end
endmodule
