// Testbench for fft_reorder at N=8: random interleaved samples; after each
// sync_out the next MUX*N outputs must be the previous period's samples
// regrouped channel by channel.
module tb_fft_reorder;
  localparam int N = 8, MUX = 4, W = 18, L = N * MUX, PER = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, sync_out;
  logic signed [W-1:0] din = 0, dout;
  int checks = 0, failures = 0, nsync = 0;
  logic signed [W-1:0] xs [PER * L];
  int out_cnt = -1;

  fft_reorder #(.N(N), .MUX(MUX), .W(W)) dut (.*);

  // checker: output period p (counting from the first sync_out) holds input period p-1
  always @(posedge clk) if (!rst) begin
    if (out_cnt >= 0 && out_cnt < L && nsync >= 2 && nsync - 2 < PER) begin
      int p, c, n;
      p = nsync - 2; c = out_cnt / N; n = out_cnt % N;
      checks++;
      if (dout !== xs[p * L + n * MUX + c]) begin
        failures++;
        if (failures < 10) $display("p=%0d c=%0d n=%0d got %0d exp %0d", p, c, n, dout, xs[p*L+n*MUX+c]);
      end
    end
    if (out_cnt >= 0) out_cnt++;
    if (sync_out) begin nsync++; out_cnt = 0; end
  end

  initial begin
    foreach (xs[i]) xs[i] = W'($urandom);
    repeat (2) @(posedge clk);
    rst <= 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    for (int t = 0; t < PER * L; t++) begin din <= xs[t]; @(posedge clk); end
    repeat (L + 2) @(posedge clk);
    checks++;
    if (checks < (PER - 1) * L) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (PER * L * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
