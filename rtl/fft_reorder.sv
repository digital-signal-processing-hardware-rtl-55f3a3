// fft_reorder: turns the sample-interleaved stream of one ADC bus into
// blocks of N consecutive samples of one channel, the order the FFT needs.
//
// In one period of MUX*N cycles the input carries sample n of channel c at
// cycle n*MUX + c. The block writes each sample at address c*N + n of one
// half of a double buffer while the other half, filled during the previous
// period, is read out in address order: channel 0 samples 0..N-1, then
// channel 1, and so on. Latency is one period plus one cycle; sync_out
// precedes the first sample of each output period by one cycle, and the
// first period after reset is not meaningful.
//
// From the design: blocks of 2^10 samples of one channel before the FFT.
// This design's choice: a plain double buffer of 2*MUX*N words.
module fft_reorder #(
  parameter int unsigned N   = 1024,
  parameter int unsigned MUX = 4,
  parameter int unsigned W   = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync_in,
  input  logic signed [W-1:0] din,
  output logic                sync_out,
  output logic signed [W-1:0] dout
);
  localparam int unsigned L  = MUX * N;
  localparam int unsigned AW = $clog2(L);
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned CW = (MUX > 1) ? $clog2(MUX) : 1;

  logic signed [W-1:0] buf_mem [2*L];
  logic [AW-1:0]       cnt;
  logic                bank;
  logic [CW-1:0]       wch;
  logic [NW-1:0]       wn;

  always_comb begin
    wch = CW'(cnt % AW'(MUX));
    wn  = NW'(cnt / AW'(MUX));
  end

  always_ff @(posedge clk) begin
    buf_mem[{bank, AW'(wch) * AW'(N) + AW'(wn)}] <= din;
    dout <= buf_mem[{~bank, cnt}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      bank     <= 1'b0;
      sync_out <= 1'b0;
    end else begin
      sync_out <= sync_in || cnt == AW'(L - 1);
      if (sync_in || cnt == AW'(L - 1)) begin
        cnt  <= '0;
        bank <= ~bank;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
