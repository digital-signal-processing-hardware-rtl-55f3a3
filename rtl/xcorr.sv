// xcorr: cross-correlator for one frequency bin per window.
//
// A window is NCH*NT samples: channel 0's NT time samples of the bin, then
// channel 1's, and so on (the order the transposer produces). For every pair
// i <= j the block sums x_i(t) * conj(x_j(t)) over the NT samples, which
// gives NCH*(NCH+1)/2 baselines per window (528 for 32 channels).
//
// How: each arriving sample x_j(t) is stored in row t of a small NT x NCH
// memory, and in the same cycle it is multiplied, conjugated, with all
// samples x_i(t), i < j, already in that row (and with itself for i = j),
// each product going into accumulator i. When channel j's last sample has
// arrived, accumulators 0..j hold the baselines (0,j) .. (j,j); they are
// copied to an output buffer and cleared. The buffer is sent out one
// baseline per cycle during the next j+1 cycles, so results stream out
// while the next channel comes in and no window ever waits. The output of a
// window is thus ordered (0,0); (0,1),(1,1); (0,2),(1,2),(2,2); ...
//
// Interface: sync_in precedes sample 0 of a window; in_valid (sampled with
// sample 0) says whether the window holds data or junk and is passed to
// out_win_valid with every baseline of it, so junk windows can be ignored
// downstream. out_valid marks a baseline on dout; out_last the window's
// last baseline. Timing: baseline (i,j) leaves 2+i cycles after x_j(NT-1)
// arrives; the last baseline of a window leaves NCH+1 cycles after it ends.
//
// From the design: 32 channels, 64 spectra folded in per window, 2048
// samples in and 528 baselines out per window, the product A*conj(B), the
// junk marking. This design's choice: the structure (one complex
// multiplier-accumulator per channel, filled as the channels stream in).
// ACC_W = 23 holds 64 products of 8-bit samples without overflow.
module xcorr
  import omni_pkg::*;
#(
  parameter int unsigned NCH   = 32,
  parameter int unsigned NT    = 64,
  parameter int unsigned ACC_W = 23
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sync_in,
  input  logic                    in_valid,
  input  cplx8_t                  din,
  output logic                    out_valid,
  output logic                    out_win_valid,
  output logic                    out_last,
  output logic [$clog2(NCH)-1:0]  bl_i,
  output logic [$clog2(NCH)-1:0]  bl_j,
  output logic signed [ACC_W-1:0] dout_re,
  output logic signed [ACC_W-1:0] dout_im
);
  localparam int unsigned CW = $clog2(NCH);
  localparam int unsigned TW = $clog2(NT);

  initial assert (NCH < NT) else $error("xcorr: output needs NCH < NT");

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } acc_t;

  cplx8_t        row_mem [NT][NCH];
  acc_t          acc     [NCH];
  acc_t          acc_nx  [NCH];
  acc_t          obuf    [NCH];
  logic [CW-1:0] ch;
  logic [TW-1:0] t;
  logic          win_v, win_v_q;
  logic [CW:0]   ocnt;
  logic [CW-1:0] oi, oj;
  logic          olast;

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      cplx8_t a;
      logic signed [17:0] pr, pi;
      a  = (CW'(i) == ch) ? din : row_mem[t][i];
      // a * conj(din)
      pr = 18'(a.re) * 18'(din.re) + 18'(a.im) * 18'(din.im);
      pi = 18'(a.im) * 18'(din.re) - 18'(a.re) * 18'(din.im);
      acc_nx[i].re = acc[i].re + ACC_W'(pr);
      acc_nx[i].im = acc[i].im + ACC_W'(pi);
    end
  end

  always_ff @(posedge clk) begin
    row_mem[t][ch] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ch            <= '0;
      t             <= '0;
      win_v         <= 1'b0;
      win_v_q       <= 1'b0;
      ocnt          <= '0;
      oi            <= '0;
      oj            <= '0;
      olast         <= 1'b0;
      out_valid     <= 1'b0;
      out_win_valid <= 1'b0;
      out_last      <= 1'b0;
      bl_i          <= '0;
      bl_j          <= '0;
      dout_re       <= '0;
      dout_im       <= '0;
      for (int i = 0; i < NCH; i++) begin
        acc[i]  <= '0;
        obuf[i] <= '0;
      end
    end else begin
      // input side
      if (sync_in) begin
        ch <= '0;
        t  <= '0;
      end else begin
        t <= t + 1;
        if (t == TW'(NT - 1)) ch <= ch + 1;
      end
      if (ch == '0 && t == '0) win_v <= in_valid;
      for (int i = 0; i < NCH; i++)
        if (CW'(i) <= ch) acc[i] <= acc_nx[i];
      if (t == TW'(NT - 1)) begin
        for (int i = 0; i < NCH; i++) begin
          obuf[i] <= acc_nx[i];
          acc[i]  <= '0;
        end
        ocnt    <= (CW+1)'(ch) + 1;
        oi      <= '0;
        oj      <= ch;
        olast   <= (ch == CW'(NCH - 1));
        win_v_q <= (ch == '0 && t == '0) ? in_valid : win_v;
      end else if (ocnt != 0) begin
        ocnt <= ocnt - 1;
        oi   <= oi + 1;
      end
      // output side
      out_valid     <= (ocnt != 0);
      out_win_valid <= win_v_q;
      out_last      <= (ocnt == 1) && olast;
      bl_i          <= oi;
      bl_j          <= oj;
      dout_re       <= obuf[oi].re;
      dout_im       <= obuf[oi].im;
    end
  end
endmodule
