// tb_omniscope_top: end-to-end test of the whole correlator at full size
// (no parameter overrides).
//
// The bench plays every part outside the design: an ADC whose 32 channels
// all carry the same two tones (FFT bins 100 and 300) plus independent
// noise, an analog swapper (64-bit shift register and transparent latch on
// the GPIO lines) that really inverts the channels its latch selects, one
// QDR SRAM model per memory port, and four 10GbE links that carry each
// F-engine output word to its X-engine across the two clock domains through
// a queue. The X-engine clock runs 2% fast, so the X-engines start with junk
// windows and meet more of them later. Software is played by the bench
// too: it loads a two-step swap pattern, sets every FFT stage to shift,
// sets the per-bin gain (5 everywhere, 8 around bin 300 so that tone clips),
// takes an ADC snapshot, sets acc_len = 1 and drains all four readout
// memories.
//
// Checks: the snapshot matches the ADC history (bar a few samples at a swap
// edge); every dumped element arrives once, in index order, tagged with
// accumulation 0; every auto-correlation has zero imaginary part and a
// non-negative real part; in X-engine 0 the strongest auto-correlation is
// at bin 100, in X-engine 2 at bin 300-256 = 44; no rx overflow, no lost
// readout word, no FFT overflow. Each mechanism (swap pattern switch,
// blanking, snapshot, clip, packet ends, junk window, finished windows,
// dumps, time-halver bus switch) must have happened at least once. The
// 64-channel bus merger beside the main system is fed with filter outputs 0
// and 1 and compared with the inputs it should have kept.
`timescale 1ns/1ps
module tb_omniscope_top;
  import omni_pkg::*;
  localparam int NX  = 4;
  localparam int NBL = 528;
  localparam int VL  = 128 * NBL;

  logic clk_f = 0, clk_x = 0, rst_f = 1, rst_x = 1;
  always #2.5  clk_f = ~clk_f;
  always #2.45 clk_x = ~clk_x;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  logic signed [ADC_BITS-1:0] adc_data [8];
  logic gpio_clk, gpio_din, gpio_en;
  logic swp_we = 0; logic [7:0] swp_addr = 0; logic [63:0] swp_wdata = 0;
  logic [8:0] swp_n_steps = 1; logic [31:0] swp_step_len = 100000, swp_zero_len = 64;
  logic [9:0] fft_shift = '1;
  logic [3:0] st_we = 0; logic [8:0] st_addr = 0; logic [3:0] st_wdata = 0;
  logic [4:0] snap_sel = 0; logic snap_arm = 0; logic [9:0] snap_addr = 0;
  logic [31:0] snap_data; logic snap_done;
  logic [3:0] fft_ovf, trunc_clip;
  qdr_req_t fqdr_req [2]; qdr_rsp_t fqdr_rsp [2];
  tge_word_t tx [NX], rx [NX];
  logic [13:0] acc_len = 1;
  qdr_req_t xqdr_req [NX][2]; qdr_rsp_t xqdr_rsp [NX][2];
  logic [NX-1:0] sw_pop = 0, sw_clear = 0;
  logic [2*QDR_DW+17+32-1:0] sw_data [NX];
  logic [10:0] sw_level [NX];
  logic [NX-1:0] sw_lost, rx_overflow, rx_underflow, win_done;
  logic h64_sync_in, h64_sync_out, h64_sel_b;
  logic signed [FFT_BITS-1:0] h64_din_a, h64_din_b, h64_dout;

  omniscope_top u_dut (.*);

  for (genvar m = 0; m < 2; m++) begin : g_fq
    qdr_sram_model #(.DEPTH_W(15)) u_q (.clk(clk_f), .qdr_req(fqdr_req[m]), .qdr_rsp(fqdr_rsp[m]));
  end
  for (genvar q = 0; q < NX; q++) begin : g_xq
    for (genvar m = 0; m < 2; m++) begin : g_m
      qdr_sram_model #(.DEPTH_W(17)) u_q (.clk(clk_x), .qdr_req(xqdr_req[q][m]), .qdr_rsp(xqdr_rsp[q][m]));
    end
  end

  // ---------------- analog swapper model ----------------
  logic [63:0] sr = '0, latch = '0;
  int n_gpio_en = 0, n_zero = 0;
  always @(posedge gpio_clk) sr <= {sr[62:0], gpio_din};
  always @(posedge gpio_en) begin latch <= sr; n_gpio_en++; end

  // ---------------- ADC model ----------------
  localparam int HIST = 1 << 21;
  logic signed [ADC_BITS-1:0] hist [HIST];
  int fcyc = 0, slot = 0;
  function automatic logic signed [ADC_BITS-1:0] tone(input int m);
    real pi = 3.14159265358979;
    return ADC_BITS'($rtoi(200.0 * $cos(2.0 * pi * 100.0 * m / 1024.0) +
                           200.0 * $cos(2.0 * pi * 300.0 * m / 1024.0)));
  endfunction
  initial foreach (adc_data[b]) adc_data[b] = '0;
  always @(posedge clk_f) begin
    int nslot;
    logic signed [ADC_BITS-1:0] v;
    nslot = u_dut.u_f.sync0 ? 0 : (slot + 1) % 4;
    slot <= nslot;
    fcyc <= fcyc + 1;
    for (int b = 0; b < 8; b++) begin
      v = tone((fcyc + 1) / 4) + ADC_BITS'(int'($urandom % 129) - 64);
      if (b == 0) hist[(fcyc + 1) % HIST] <= v;
      adc_data[b] <= latch[4 * b + nslot] ? -v : v;
    end
    if (u_dut.u_f.sw_z[0]) n_zero++;
  end

  // ---------------- 64-channel bus merger ----------------
  // fed with filter outputs 0 and 1 of the running F-engine
  assign h64_sync_in = u_dut.u_f.pfb_sync[0];
  assign h64_din_a   = u_dut.u_f.pfb_d[0];
  assign h64_din_b   = u_dut.u_f.pfb_d[1];
  logic signed [FFT_BITS-1:0] hb_hist [8192];
  logic signed [FFT_BITS-1:0] ha_prev = '0;
  int hk = 0, n_hb = 0, h_bad = 0, h_checks = 0;
  logic h_sel_prev = 0;
  always @(posedge clk_f) begin
    if (!rst_f) begin
      if (hk > 3 * 4096) begin
        h_checks++;
        if (h64_sel_b ? (h64_dout != hb_hist[(hk - 1 - 4096) % 8192]) : (h64_dout != ha_prev)) h_bad++;
      end
      if (h64_sel_b && !h_sel_prev) n_hb++;
      h_sel_prev = h64_sel_b;
      hb_hist[hk % 8192] = h64_din_b;
      ha_prev = h64_din_a;
      hk++;
    end
  end

  // ---------------- links ----------------
  logic [63:0] lq [NX][$];
  logic        lq_eof [NX][$];
  int n_eof = 0;
  always @(posedge clk_f)
    for (int q = 0; q < NX; q++)
      if (!rst_f && tx[q].valid) begin
        lq[q].push_back(tx[q].data);
        lq_eof[q].push_back(tx[q].eof);
        if (tx[q].eof) n_eof++;
      end
  initial foreach (rx[q]) rx[q] = '0;
  always @(posedge clk_x)
    for (int q = 0; q < NX; q++) begin
      if (lq[q].size() > 0) begin
        rx[q] <= '{valid: 1'b1, eof: lq_eof[q][0], data: lq[q][0]};
        void'(lq[q].pop_front());
        void'(lq_eof[q].pop_front());
      end else rx[q] <= '0;
    end

  // ---------------- readout (software) ----------------
  logic [NX-1:0] pop_d = 0;
  int got [NX], n_under = 0, n_win = 0;
  real auto_sum [NX][128];
  initial foreach (got[q]) begin got[q] = 0; foreach (auto_sum[q][k]) auto_sum[q][k] = 0.0; end
  function automatic bit is_auto(input int b);
    for (int j = 0; j < 32; j++) if (b == j * (j + 1) / 2 + j) return 1;
    return 0;
  endfunction
  always @(posedge clk_x) begin
    if (!rst_x) begin
      for (int q = 0; q < NX; q++) begin
        logic [31:0] an; logic [16:0] idx; logic signed [35:0] re, im;
        if (rx_underflow[q]) n_under++;
        if (win_done[q]) n_win++;
        pop_d[q]  <= sw_pop[q];
        sw_pop[q] <= !sw_pop[q] && sw_level[q] > 0;
        if (pop_d[q]) begin
          {an, idx, re, im} = sw_data[q];
          if (got[q] < VL) begin
            check(an == 0 && int'(idx) == got[q], $sformatf("X%0d dump order idx=%0d exp=%0d an=%0d", q, idx, got[q], an));
            if (is_auto(int'(idx) % NBL)) begin
              check(im == 0 && re >= 0, $sformatf("X%0d auto idx=%0d re=%0d im=%0d", q, idx, re, im));
              auto_sum[q][int'(idx) / NBL] += real'(re);
            end
          end
          got[q]++;
        end
      end
    end
  end

  // ---------------- software sequence ----------------
  int snap_bad;
  initial begin
    int done_all;
    repeat (10) @(posedge clk_f);
    // swap pattern: step 0 none inverted, step 1 every other channel
    @(negedge clk_f);
    swp_we = 1; swp_addr = 0; swp_wdata = 64'h0;
    @(negedge clk_f); swp_addr = 1; swp_wdata = 64'hAAAA_AAAA_AAAA_AAAA;
    @(negedge clk_f); swp_we = 0; swp_n_steps = 2; swp_step_len = 50000;
    // per-bin gain for all four truncators
    for (int k = 0; k < 512; k++) begin
      @(negedge clk_f);
      st_we = '1; st_addr = 9'(k); st_wdata = (k >= 296 && k <= 304) ? 4'd8 : 4'd5;
    end
    @(negedge clk_f); st_we = '0;
    rst_f = 0;
    rst_x = 0;
    // snapshot of ADC bus 0 (after the swapper)
    repeat (20000) @(posedge clk_f);
    @(negedge clk_f); snap_sel = 0; snap_arm = 1;
    @(negedge clk_f); snap_arm = 0;
    wait (snap_done);
    @(negedge clk_f); snap_addr = 0;
    @(negedge clk_f);
    // compare captured word k with the ADC history, searching the start
    begin
      logic signed [ADC_BITS-1:0] cap [1024];
      int best = 0, bestm = 1 << 30;
      for (int k = 0; k < 1024; k++) begin
        @(negedge clk_f); snap_addr = 10'(k);
        @(negedge clk_f); cap[k] = snap_data[31 -: ADC_BITS];
        check(snap_data[31-ADC_BITS:0] == 0, "snapshot low bits");
      end
      for (int s = fcyc - 30000; s < fcyc - 1024; s++) begin
        int mm;
        mm = 0;
        for (int k = 0; k < 1024 && mm < bestm; k++) if (hist[(s + k) % HIST] != cap[k]) mm++;
        if (mm < bestm) begin bestm = mm; best = s; end
      end
      snap_bad = bestm;
      check(bestm <= 8, $sformatf("snapshot matches ADC history (mismatches %0d)", bestm));
    end
    // wait for one full accumulation from every X-engine
    done_all = 0;
    while (!done_all) begin
      @(posedge clk_x);
      done_all = 1;
      for (int q = 0; q < NX; q++) if (got[q] < VL) done_all = 0;
    end
    repeat (100) @(posedge clk_x);
    // spectral checks
    for (int q = 0; q < NX; q += 2) begin
      int pk = 0;
      for (int k = 1; k < 128; k++) if (auto_sum[q][k] > auto_sum[q][pk]) pk = k;
      check(pk == (q == 0 ? 100 : 44), $sformatf("X%0d auto peak at bin %0d", q, pk));
    end
    $display("X0 auto sum: bin100 %0.0f bin20 %0.0f; X2 bin44 %0.0f", auto_sum[0][100], auto_sum[0][20], auto_sum[2][44]);
    check(rx_overflow == 0, "no rx overflow");
    check(sw_lost == 0, "no readout word lost");
    check(fft_ovf == 0, "no FFT overflow with every stage shifting");
    // mechanisms
    $display("halver: b frames=%0d checked=%0d", n_hb, h_checks);
    $display("mechanisms: swaps=%0d blank_cycles=%0d clip=%b eof=%0d junk=%0d windows=%0d dumps=%0d/%0d/%0d/%0d snap_mismatch=%0d",
             n_gpio_en, n_zero, trunc_clip, n_eof, n_under, n_win, got[0], got[1], got[2], got[3], snap_bad);
    check(h_bad == 0 && h_checks > 0, $sformatf("time halver output (%0d of %0d wrong)", h_bad, h_checks));
    check(n_hb >= 2, "time halver switched to the delayed bus");
    check(n_gpio_en >= 2, "swap patterns switched");
    check(n_zero > 0, "samples blanked after a switch");
    check(trunc_clip[0] || trunc_clip[1] || trunc_clip[2] || trunc_clip[3], "truncator clipped the strong tone");
    check(n_eof >= 4, "packets ended");
    check(n_under > 0, "junk windows seen");
    check(n_win >= 4 * 128, "baseline windows finished");
    for (int q = 0; q < NX; q++) check(got[q] >= VL, $sformatf("X%0d dumped a whole vector", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
