// fengine: the F-engine of the 32-channel correlator.
//
// Eight ADC buses (four channels each, time-multiplexed at 200 MHz) pass
// through: the digital swapper (undo the analog inversion, flag samples in
// the switching transient), the polyphase FIR window (blank the outputs a
// flagged sample touches), the reorder into 1024-sample blocks of one
// channel, and the FFT, which merges two buses into one complex bus of 8
// channels x 512 bins. Each of the four FFT buses is then gain-adjusted per
// bin and cut to 8+8 bits, the spectrum divider regroups the four buses into
// four frequency quarters of 128 bins, each carrying all 32 channels, and
// two transposers, each with one external QDR SRAM holding two quarters,
// reorder every quarter into bin / channel / 64-spectra order. Finally each
// quarter is packed into 64-bit words and 512-word packets for its own
// 10GbE link to one X-engine.
//
// A sync generator pulses every MUX*N cycles (4096) after reset; the pulse
// runs one cycle ahead of each frame and every stage passes it on with its
// data. The swap controller drives the GPIO lines of the analog swapper.
// One snapshot memory can capture any of 32 taps: ADC bus b (taps 0-7), PFB
// output b (8-15), FFT bus f real/imag top 16 bits each (16-19) and
// truncator output f (20-23), each sign-aligned to bit 31.
//
// Software-facing controls are plain ports: swap pattern RAM and timing, FFT
// shift schedule, per-bin shift RAM (written to the truncators selected by
// st_we), snapshot select/arm/read. Status: sticky FFT overflow and
// truncator clip flags per FFT bus.
//
// From the design: the chain and its order, all sizes. This design's
// choices: sync period, snapshot tap layout, status flags.
//
// Unused on purpose: the truncators' idx outputs, the swap controller's
// new_pattern pulse and the filters' zout flags (blanking is already
// applied to the filter output, so nothing downstream needs the flag).
module fengine
  import omni_pkg::*;
#(
  parameter int unsigned NADC  = 8,     // ADC buses (4 channels each)
  parameter int unsigned N     = 1024,  // FFT length
  parameter int unsigned P     = 4,     // PFB taps
  parameter int unsigned T     = 64,    // spectra per transpose block
  parameter int unsigned PKT   = 512,   // 10GbE words per packet
  parameter int unsigned NSW   = 64,    // swap word width (ADC inputs)
  parameter int unsigned SNAPD = 1024   // snapshot depth
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [ADC_BITS-1:0] adc_data [NADC],
  // swapper
  input  logic                      swp_we,
  input  logic [7:0]                swp_addr,
  input  logic [NSW-1:0]            swp_wdata,
  input  logic [8:0]                swp_n_steps,
  input  logic [31:0]               swp_step_len,
  input  logic [31:0]               swp_zero_len,
  output logic                      gpio_clk,
  output logic                      gpio_din,
  output logic                      gpio_en,
  // FFT and truncator
  input  logic [$clog2(N)-1:0]      fft_shift,
  input  logic [NADC/2-1:0]         st_we,
  input  logic [$clog2(N)-2:0]      st_addr,
  input  logic [3:0]                st_wdata,
  // snapshot
  input  logic [4:0]                snap_sel,
  input  logic                      snap_arm,
  input  logic [$clog2(SNAPD)-1:0]  snap_addr,
  output logic [31:0]               snap_data,
  output logic                      snap_done,
  // external memory and links
  output qdr_req_t                  qdr_req [2],
  input  qdr_rsp_t                  qdr_rsp [2],
  output tge_word_t                 tx      [NADC/2],
  // status
  output logic [NADC/2-1:0]         fft_ovf,
  output logic [NADC/2-1:0]         trunc_clip
);
  localparam int unsigned NF    = NADC / 2;          // FFT buses = parts
  localparam int unsigned FRAME = ADC_MUX * N;       // sync period
  localparam int unsigned BINS  = N / 2;
  localparam int unsigned CH_F  = 2 * ADC_MUX;       // channels per FFT bus

  // ---------------- sync generator ----------------
  logic [$clog2(FRAME)-1:0] sync_cnt;
  logic                     sync0;
  always_ff @(posedge clk) begin
    if (rst) begin
      sync_cnt <= '0;
      sync0    <= 1'b0;
    end else begin
      sync_cnt <= sync_cnt + 1;
      sync0    <= (sync_cnt == '0);
    end
  end

  // ---------------- swapper ----------------
  logic [NSW-1:0] swap_state;
  logic           zeroing;
  logic           new_pattern;
  swap_controller #(.NCH(NSW), .STEPS(256)) u_swapctl (
    .clk, .rst,
    .sw_we(swp_we), .sw_addr(swp_addr), .sw_wdata(swp_wdata),
    .n_steps(swp_n_steps), .step_len(swp_step_len), .zero_len(swp_zero_len),
    .gpio_clk, .gpio_din, .gpio_en,
    .swap_state, .zeroing, .new_pattern
  );

  logic                      sw_sync [NADC];
  logic signed [ADC_BITS-1:0] sw_d   [NADC];
  logic                      sw_z    [NADC];
  logic                      pfb_sync [NADC];
  logic signed [FFT_BITS-1:0] pfb_d  [NADC];
  logic                      pfb_z   [NADC];
  logic                      ro_sync [NADC];
  logic signed [FFT_BITS-1:0] ro_d   [NADC];

  for (genvar b = 0; b < NADC; b++) begin : g_adc
    digital_swapper #(.BUS(b), .MUX(ADC_MUX), .NCH(NSW), .W(ADC_BITS)) u_swap (
      .clk, .rst, .sync_in(sync0), .din(adc_data[b]), .swap_state, .zeroing,
      .sync_out(sw_sync[b]), .dout(sw_d[b]), .zflag(sw_z[b])
    );
    pfb_fir #(.N(N), .P(P), .MUX(ADC_MUX), .DIN_W(ADC_BITS), .DOUT_W(FFT_BITS)) u_pfb (
      .clk, .rst, .sync_in(sw_sync[b]), .din(sw_d[b]), .zin(sw_z[b]),
      .sync_out(pfb_sync[b]), .dout(pfb_d[b]), .zout(pfb_z[b])
    );
    fft_reorder #(.N(N), .MUX(ADC_MUX), .W(FFT_BITS)) u_reorder (
      .clk, .rst, .sync_in(pfb_sync[b]), .din(pfb_d[b]),
      .sync_out(ro_sync[b]), .dout(ro_d[b])
    );
  end

  // ---------------- FFT and shifter/truncator ----------------
  logic                       fft_sync [NF];
  logic signed [FFT_BITS-1:0] fft_re   [NF];
  logic signed [FFT_BITS-1:0] fft_im   [NF];
  logic                       fft_o    [NF];
  logic                       st_sync  [NF];
  cplx8_t                     st_d     [NF];
  logic signed [TRUNC_BITS-1:0] st_re  [NF];
  logic signed [TRUNC_BITS-1:0] st_im  [NF];
  logic                       st_clip  [NF];

  for (genvar f = 0; f < NF; f++) begin : g_fft
    fft_real2x #(.N(N), .W(FFT_BITS)) u_fft (
      .clk, .rst, .sync_in(ro_sync[2*f]), .a_in(ro_d[2*f]), .b_in(ro_d[2*f+1]),
      .shift_sched(fft_shift),
      .sync_out(fft_sync[f]), .dout_re(fft_re[f]), .dout_im(fft_im[f]), .ovf(fft_o[f])
    );
    shift_truncate #(.CNT_W($clog2(CH_F * BINS)), .BIN_W($clog2(BINS)),
                     .DIN_W(FFT_BITS), .DOUT_W(TRUNC_BITS), .SH_W(4)) u_st (
      .clk, .rst, .sync_in(fft_sync[f]), .din_re(fft_re[f]), .din_im(fft_im[f]),
      .sw_we(st_we[f]), .sw_addr(st_addr), .sw_wdata(st_wdata),
      .sync_out(st_sync[f]), .dout_re(st_re[f]), .dout_im(st_im[f]),
      .clip(st_clip[f]), .idx()
    );
    always_comb st_d[f] = '{re: st_re[f], im: st_im[f]};
    always_ff @(posedge clk) begin
      if (rst) begin
        fft_ovf[f]    <= 1'b0;
        trunc_clip[f] <= 1'b0;
      end else begin
        if (fft_o[f])   fft_ovf[f]    <= 1'b1;
        if (st_clip[f]) trunc_clip[f] <= 1'b1;
      end
    end
  end

  // ---------------- spectrum divider ----------------
  logic   sd_sync;
  cplx8_t sd_d [NF];
  spectrum_divider #(.NBUS(NF), .CH(CH_F), .BINS(BINS)) u_div (
    .clk, .rst, .sync_in(st_sync[0]), .din(st_d), .sync_out(sd_sync), .dout(sd_d)
  );

  // ---------------- transposers and 10GbE packing ----------------
  for (genvar q = 0; q < NF / 2; q++) begin : g_tr
    cplx8_t tr_in  [2];
    cplx8_t tr_out [2];
    logic   tr_sync, tr_valid;
    assign tr_in[0] = sd_d[2*q];
    assign tr_in[1] = sd_d[2*q+1];
    transposer #(.NS(2), .CHN(NF * CH_F), .BINS(BINS / NF), .T(T)) u_tr (
      .clk, .rst, .sync_in(sd_sync), .din(tr_in),
      .qdr_req(qdr_req[q]), .qdr_rsp(qdr_rsp[q]),
      .sync_out(tr_sync), .out_valid(tr_valid), .dout(tr_out)
    );
    for (genvar s = 0; s < 2; s++) begin : g_pk
      tge_tx_packer #(.PKT(PKT)) u_pk (
        .clk, .rst, .sync_in(tr_sync), .in_valid(tr_valid), .din(tr_out[s]),
        .tx(tx[2*q+s])
      );
    end
  end

  // ---------------- snapshot ----------------
  logic [31:0] tap_data [32];
  logic        tap_sync [32];
  always_comb begin
    for (int i = 0; i < 32; i++) begin
      tap_data[i] = '0;
      tap_sync[i] = 1'b0;
    end
    for (int b = 0; b < NADC; b++) begin
      tap_data[b]     = {sw_d[b], {(32-ADC_BITS){1'b0}}};
      tap_sync[b]     = sw_sync[b];
      tap_data[8 + b] = {pfb_d[b], {(32-FFT_BITS){1'b0}}};
      tap_sync[8 + b] = pfb_sync[b];
    end
    for (int f = 0; f < NF; f++) begin
      tap_data[16 + f] = {fft_re[f][FFT_BITS-1 -: 16], fft_im[f][FFT_BITS-1 -: 16]};
      tap_sync[16 + f] = fft_sync[f];
      tap_data[20 + f] = {st_d[f], 16'h0000};
      tap_sync[20 + f] = st_sync[f];
    end
  end

  snap_monitor #(.NIN(32), .DEPTH(SNAPD)) u_snap (
    .clk, .rst, .tap_data, .tap_sync, .sel(snap_sel), .arm(snap_arm),
    .rd_addr(snap_addr), .rd_data(snap_data), .done(snap_done)
  );
endmodule
