// Testbench for shift_truncate: random per-bin shifts written through the
// software port, random 18-bit complex input with a mix of quiet and loud
// samples. The expected 8-bit output is computed by integer arithmetic:
// floor(v * 2^s / 2^10), clamped to [-128, 127]. Checks data, clip flag,
// the 2-cycle latency and that clamping did occur.
module tb_shift_truncate;
  localparam int CNT_W = 12, BIN_W = 9, T = 3 * (1 << CNT_W);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, sw_we = 0, sync_out, clip;
  logic [BIN_W-1:0] sw_addr = 0; logic [3:0] sw_wdata = 0;
  logic signed [17:0] din_re = 0, din_im = 0;
  logic signed [7:0] dout_re, dout_im;
  logic [CNT_W-1:0] idx;
  int checks = 0, failures = 0, nclip = 0;
  int shv [1 << BIN_W];
  logic signed [17:0] xr [T], xi [T];

  shift_truncate dut (.*);

  function automatic int expect_v(int v, int s, output bit c);
    longint x;
    x = (longint'(v) * (longint'(1) << s));
    x = (x >= 0) ? x / 1024 : -((-x + 1023) / 1024);
    c = 0;
    if (x > 127) begin x = 127; c = 1; end
    if (x < -128) begin x = -128; c = 1; end
    return int'(x);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < (1 << BIN_W); b++) begin
      shv[b] = $urandom % 12;
      sw_we <= 1; sw_addr <= BIN_W'(b); sw_wdata <= 4'(shv[b]); @(posedge clk);
    end
    sw_we <= 0;
    foreach (xr[i]) begin
      int sz; sz = ($urandom % 4 == 0) ? 17 : 9;
      xr[i] = 18'($signed($urandom) >>> (32 - sz));
      xi[i] = 18'($signed($urandom) >>> (32 - sz));
    end
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    fork
      for (int t = 0; t < T; t++) begin din_re <= xr[t]; din_im <= xi[t]; @(posedge clk); end
      begin
        @(posedge clk);  // output lags the input by two cycles
        for (int t = 0; t < T; t++) begin
          bit c1, c2; int er, ei, s;
          @(posedge clk); #1;
          s = shv[t % (1 << BIN_W)];
          er = expect_v(xr[t], s, c1); ei = expect_v(xi[t], s, c2);
          checks++;
          if (dout_re != er || dout_im != ei || clip != (c1 | c2) || idx != CNT_W'(t)) begin
            failures++;
            if (failures < 10) $display("t=%0d s=%0d x=%0d,%0d got %0d,%0d exp %0d,%0d", t, s, xr[t], xi[t], dout_re, dout_im, er, ei);
          end
          if (c1 | c2) nclip++;
        end
      end
    join
    checks++;
    if (nclip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (T + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
