// xengine: one X-engine of the correlator, handling one quarter of the band.
//
// Words from its 10GbE link are buffered into whole correlator windows
// (tge_rx_buffer), each window (32 channels x 64 spectra of one frequency
// bin) is cross-correlated into 528 baselines (xcorr), and the baselines of
// valid windows are accumulated over acc_len vectors of 128 bins x 528
// baselines in two external QDR SRAMs (vacc). Finished accumulations are
// queued in a small memory that software drains (vacc_readout).
//
// The rx buffer's window counter is the X-engine's sync: it starts the
// correlator on every window, and junk windows are marked so that their
// baselines never reach the accumulator. Status: sticky overflow of the rx
// FIFO, an underflow pulse per junk window, and a pulse per finished
// baseline window.
//
// From the design: the chain and its sizes. This design's choices: the
// status signals and the software port layout.
//
// Unused on purpose: the correlator's bl_i/bl_j outputs; the accumulator
// numbers baselines by arrival order, which fixes the same pairs.
module xengine
  import omni_pkg::*;
#(
  parameter int unsigned NCH   = 32,    // channels
  parameter int unsigned NT    = 64,    // spectra per correlator window
  parameter int unsigned NBIN  = 128,   // bins per X-engine
  parameter int unsigned FIFO  = 2048,  // rx FIFO depth in words
  parameter int unsigned RDEP  = 1024   // readout memory depth
) (
  input  logic                       clk,
  input  logic                       rst,
  input  tge_word_t                  rx,
  input  logic [13:0]                acc_len,
  output qdr_req_t                   qdr_req [2],
  input  qdr_rsp_t                   qdr_rsp [2],
  input  logic                       sw_pop,
  input  logic                       sw_clear,
  output logic [2*QDR_DW+$clog2(NBIN*NCH*(NCH+1)/2)+32-1:0] sw_data,
  output logic [$clog2(RDEP):0]      sw_level,
  output logic                       sw_lost,
  output logic                       rx_overflow,
  output logic                       rx_underflow,
  output logic                       win_done
);
  localparam int unsigned NBL  = NCH * (NCH + 1) / 2;
  localparam int unsigned VLEN = NBIN * NBL;
  localparam int unsigned IW   = $clog2(VLEN);
  localparam int unsigned AW   = 23;

  logic   b_sync, b_valid;
  cplx8_t b_d;
  tge_rx_buffer #(.WIN(NCH * NT), .DEPTH(FIFO)) u_buf (
    .clk, .rst, .rx, .sync_out(b_sync), .out_valid(b_valid), .dout(b_d),
    .underflow(rx_underflow), .overflow(rx_overflow)
  );

  logic                    c_valid, c_wv, c_last;
  logic [$clog2(NCH)-1:0]  c_i, c_j;
  logic signed [AW-1:0]    c_re, c_im;
  xcorr #(.NCH(NCH), .NT(NT), .ACC_W(AW)) u_xc (
    .clk, .rst, .sync_in(b_sync), .in_valid(b_valid), .din(b_d),
    .out_valid(c_valid), .out_win_valid(c_wv), .out_last(c_last),
    .bl_i(c_i), .bl_j(c_j), .dout_re(c_re), .dout_im(c_im)
  );
  assign win_done = c_valid && c_last;

  logic                     d_valid;
  logic [IW-1:0]            d_idx;
  logic signed [QDR_DW-1:0] d_re, d_im;
  logic [31:0]              d_num;
  vacc #(.VLEN(VLEN), .IN_W(AW)) u_vacc (
    .clk, .rst, .in_valid(c_valid && c_wv), .in_re(c_re), .in_im(c_im), .acc_len,
    .qdr_req, .qdr_rsp,
    .dump_valid(d_valid), .dump_idx(d_idx), .dump_re(d_re), .dump_im(d_im), .acc_num(d_num)
  );

  vacc_readout #(.DEPTH(RDEP), .IW(IW)) u_ro (
    .clk, .rst, .dump_valid(d_valid), .dump_idx(d_idx), .dump_re(d_re), .dump_im(d_im),
    .acc_num(d_num), .sw_pop, .sw_clear, .sw_data, .level(sw_level), .lost(sw_lost)
  );
endmodule
