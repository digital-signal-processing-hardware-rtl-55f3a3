// transposer: corner turn through an external QDR SRAM.
//
// Input: NS streams in lock step (NS spectrum parts sharing one SRAM), each
// a frame of CHN channels x BINS bins per FRAME = CHN*BINS cycles, channel-
// major: the order the FFT produces. Output: for each bin, for each channel,
// T consecutive spectra of that channel and bin: the order the cross-
// correlator needs (all time samples of one channel in a row, then the next
// channel, then the next bin). T frames make one block of T*CHN*BINS words.
//
// The NS 16-bit samples of a cycle are written as one QDR word at address
// {bank, t, ch, bin} in the order they arrive. When a block is complete the
// bank flips and the finished bank is read with the address fields walked
// in the order bin (slowest), ch, t (fastest); one read and one write every
// cycle, exactly the SRAM's bandwidth. The first output block starts one
// block after the first input sync; from then the output is continuous.
//
// Timing: sync_in precedes sample 0 of an input frame; the first sync after
// reset starts the count and later syncs are taken to agree with it.
// Requests are registered; read data returns QDR_RD_LAT cycles after the
// request is sampled. sync_out precedes the first sample of each output
// block by one cycle; out_valid is high while real data is coming out.
//
// From the design: the data orders before and after, T = 64 spectra, 16-bit
// samples, the use of the two board QDR SRAMs with one 36-bit read and one
// 36-bit write per cycle. This design's choices: double buffering by a bank
// bit in the address, two streams per SRAM word, the address layout.
//
// Unused on purpose: qdr_rsp.rvalid (read data is timed by the fixed
// QDR_RD_LAT). The top address bit of both QDR addresses is always 0:
// two banks of one block need 19 of the 20 address bits.
module transposer
  import omni_pkg::*;
#(
  parameter int unsigned NS   = 2,    // streams sharing this SRAM
  parameter int unsigned CHN  = 32,   // channels per frame
  parameter int unsigned BINS = 128,  // bins per frame
  parameter int unsigned T    = 64    // spectra per block
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     sync_in,
  input  cplx8_t   din       [NS],
  output qdr_req_t qdr_req,
  input  qdr_rsp_t qdr_rsp,
  output logic     sync_out,
  output logic     out_valid,
  output cplx8_t   dout      [NS]
);
  localparam int unsigned BW = $clog2(BINS);
  localparam int unsigned CW = $clog2(CHN);
  localparam int unsigned TW = $clog2(T);
  localparam int unsigned AW = BW + CW + TW;     // address within a bank
  localparam int unsigned L  = QDR_RD_LAT;

  initial assert (AW + 1 <= QDR_AW) else $error("transposer: block does not fit the SRAM");
  initial assert (NS * 16 <= QDR_DW) else $error("transposer: streams do not fit a word");

  logic          started, reading, wbank;
  logic [AW-1:0] wcnt;                 // {t, ch, bin}
  logic [AW-1:0] rcnt;                 // {bin, ch, t}
  logic [BW-1:0] r_bin;
  logic [CW-1:0] r_ch;
  logic [TW-1:0] r_t;
  logic [L:0]    first_pipe;
  logic [L:0]    valid_pipe;
  logic [QDR_DW-1:0] wword;

  always_comb begin
    {r_bin, r_ch, r_t} = rcnt;
    wword = '0;
    for (int s = 0; s < NS; s++) wword[16*s +: 16] = din[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started    <= 1'b0;
      reading    <= 1'b0;
      wbank      <= 1'b0;
      wcnt       <= '0;
      rcnt       <= '0;
      qdr_req    <= '0;
      first_pipe <= '0;
      valid_pipe <= '0;
      sync_out   <= 1'b0;
      out_valid  <= 1'b0;
      for (int s = 0; s < NS; s++) dout[s] <= '0;
    end else begin
      // write side
      qdr_req.wr <= 1'b0;
      if (sync_in && !started) begin
        started <= 1'b1;
        wcnt    <= '0;
      end else if (started) begin
        qdr_req.wr    <= 1'b1;
        qdr_req.waddr <= QDR_AW'({wbank, wcnt});
        qdr_req.wdata <= wword;
        wcnt          <= wcnt + 1;
        if (wcnt == AW'((1 << AW) - 1)) begin
          wbank   <= ~wbank;
          reading <= 1'b1;
          rcnt    <= '0;
        end
      end
      // read side: the bank not being written
      qdr_req.rd    <= reading;
      qdr_req.raddr <= QDR_AW'({~wbank, r_t, r_ch, r_bin});
      if (reading) rcnt <= rcnt + 1;
      first_pipe <= {first_pipe[L-1:0], reading && rcnt == '0};
      valid_pipe <= {valid_pipe[L-1:0], reading};
      // returning data
      sync_out  <= first_pipe[L-1];
      out_valid <= valid_pipe[L];
      for (int s = 0; s < NS; s++) dout[s] <= qdr_rsp.rdata[16*s +: 16];
    end
  end
endmodule
