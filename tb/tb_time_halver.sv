// tb_time_halver: self-checking test of time_halver at N = 16, MUX = 4
// (64-cycle frames).
//
// Bus a carries 1000000 + t and bus b 2000000 + t (t = cycles since the
// first sync, cut to 18 bits by a modulus small enough to stay positive),
// so every output sample names its source bus and time. After a sync,
// output frame 2k must hold bus a at frame 2k and frame 2k+1 must hold bus
// b at frame 2k (one frame old); sel_b must mark the bus b frames and
// sync_out must follow sync_in by one cycle. Syncs arrive once per frame,
// as in the F-engine, plus one stray sync mid-frame; neither may disturb
// the frame parity set by the first sync.
`timescale 1ns/1ps
module tb_time_halver;
  localparam int N = 16, MUX = 4, BLK = N * MUX, W = 18;
  logic clk = 0, rst = 1, sync_in = 0;
  logic signed [W-1:0] din_a = 0, din_b = 0, dout;
  logic sync_out, sel_b;
  int checks = 0, failures = 0;
  time_halver #(.N(N), .MUX(MUX), .W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] val(input int bus, input int t);
    return W'(bus * 50000 + (t % 40000));
  endfunction

  int t0 = 0, t = -1;   // t: time index of the sample on din (-1 before sync)
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    sync_in <= 1;
    @(posedge clk);
    sync_in <= 0;
    t = 0;
    for (int c = 0; c < 10 * BLK; c++) begin
      din_a   <= val(1, t);
      din_b   <= val(2, t);
      // one sync per frame as in the F-engine, plus a stray one mid-frame
      sync_in <= (t % BLK == BLK - 1) || (t == 5 * BLK + 20);
      @(posedge clk);
      #1;
      // output now shows the sample that was on din in the cycle just past
      begin
        int f;
        logic signed [W-1:0] exp;
        f = t / BLK;
        if (f % 2 == 0) exp = val(1, t);
        else            exp = val(2, t - BLK);
        checks++;
        if (dout != exp || sel_b != (f % 2 == 1)) begin
          failures++;
          if (failures < 10) $display("FAIL t %0d dout %0d exp %0d sel_b %b", t, dout, exp, sel_b);
        end
      end
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sync_out follows sync_in by one cycle
  logic sync_d = 0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (sync_out != sync_d) failures++;
    end
    sync_d <= sync_in;
  end

  initial begin
    #1ms;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
