// omniscope_top: the 32-channel FFT-telescope correlator, one F-engine and
// four X-engines.
//
// The F-engine (clk_f) windows, Fourier-transforms, scales, splits and
// transposes 32 antenna channels and sends one quarter of the band to each
// X-engine over its own 10GbE link. Each X-engine (clk_x) correlates all
// channel pairs in its 128 bins and accumulates them. Both clocks are
// nominally 200 MHz but not coupled; the X-engine's receive buffer absorbs
// the difference by emitting junk windows when it runs short (it has no
// defence against a slower X clock, which would eventually overflow it). The
// two sides are separate boards: the links, the QDR SRAMs, the ADC and the
// analog swapper are outside this design, so their signals are ports here.
// tx[q] must be carried by a 10GbE link to rx[q].
//
// Beside the 32-channel system stands the one block that the 64-channel
// version of the F-engine adds, the time halver, with its own ports (h64_*,
// clocked by clk_f): it merges two filtered buses into one by keeping every
// other frame of each. The rest of the 64-channel version is the same
// blocks at larger sizes, so it is not instantiated a second time here.
module omniscope_top
  import omni_pkg::*;
#(
  parameter int unsigned NX = 4   // X-engines = frequency quarters
) (
  input  logic                       clk_f,
  input  logic                       rst_f,
  input  logic                       clk_x,
  input  logic                       rst_x,
  // ADC and analog swapper
  input  logic signed [ADC_BITS-1:0] adc_data [8],
  output logic                       gpio_clk,
  output logic                       gpio_din,
  output logic                       gpio_en,
  // F-engine software controls
  input  logic                       swp_we,
  input  logic [7:0]                 swp_addr,
  input  logic [63:0]                swp_wdata,
  input  logic [8:0]                 swp_n_steps,
  input  logic [31:0]                swp_step_len,
  input  logic [31:0]                swp_zero_len,
  input  logic [9:0]                 fft_shift,
  input  logic [3:0]                 st_we,
  input  logic [8:0]                 st_addr,
  input  logic [3:0]                 st_wdata,
  input  logic [4:0]                 snap_sel,
  input  logic                       snap_arm,
  input  logic [9:0]                 snap_addr,
  output logic [31:0]                snap_data,
  output logic                       snap_done,
  output logic [3:0]                 fft_ovf,
  output logic [3:0]                 trunc_clip,
  // F-engine external memory and links
  output qdr_req_t                   fqdr_req [2],
  input  qdr_rsp_t                   fqdr_rsp [2],
  output tge_word_t                  tx       [NX],
  // X-engines
  input  tge_word_t                  rx       [NX],
  input  logic [13:0]                acc_len,
  output qdr_req_t                   xqdr_req [NX][2],
  input  qdr_rsp_t                   xqdr_rsp [NX][2],
  input  logic [NX-1:0]              sw_pop,
  input  logic [NX-1:0]              sw_clear,
  output logic [2*QDR_DW+17+32-1:0]  sw_data  [NX],
  output logic [10:0]                sw_level [NX],
  output logic [NX-1:0]              sw_lost,
  output logic [NX-1:0]              rx_overflow,
  output logic [NX-1:0]              rx_underflow,
  output logic [NX-1:0]              win_done,
  // 64-channel bus merger
  input  logic                       h64_sync_in,
  input  logic signed [FFT_BITS-1:0] h64_din_a,
  input  logic signed [FFT_BITS-1:0] h64_din_b,
  output logic                       h64_sync_out,
  output logic signed [FFT_BITS-1:0] h64_dout,
  output logic                       h64_sel_b
);
  fengine u_f (
    .clk(clk_f), .rst(rst_f), .adc_data,
    .swp_we, .swp_addr, .swp_wdata, .swp_n_steps, .swp_step_len, .swp_zero_len,
    .gpio_clk, .gpio_din, .gpio_en,
    .fft_shift, .st_we, .st_addr, .st_wdata,
    .snap_sel, .snap_arm, .snap_addr, .snap_data, .snap_done,
    .qdr_req(fqdr_req), .qdr_rsp(fqdr_rsp), .tx,
    .fft_ovf, .trunc_clip
  );

  time_halver #(.N(1024), .MUX(ADC_MUX), .W(FFT_BITS)) u_h64 (
    .clk(clk_f), .rst(rst_f), .sync_in(h64_sync_in), .din_a(h64_din_a), .din_b(h64_din_b),
    .sync_out(h64_sync_out), .dout(h64_dout), .sel_b(h64_sel_b)
  );

  for (genvar q = 0; q < NX; q++) begin : g_x
    xengine u_x (
      .clk(clk_x), .rst(rst_x), .rx(rx[q]), .acc_len,
      .qdr_req(xqdr_req[q]), .qdr_rsp(xqdr_rsp[q]),
      .sw_pop(sw_pop[q]), .sw_clear(sw_clear[q]), .sw_data(sw_data[q]),
      .sw_level(sw_level[q]), .sw_lost(sw_lost[q]),
      .rx_overflow(rx_overflow[q]), .rx_underflow(rx_underflow[q]), .win_done(win_done[q])
    );
  end
endmodule
