// Testbench for swap_controller: loads three swap patterns, lets the
// controller cycle through them, and models the external shift register and
// latches. Checks that every latched word equals the pattern of its step, in
// order, that swap_state follows the latch, that blanking lasts exactly
// zero_len cycles and that steps are step_len cycles apart.
module tb_swap_controller;
  localparam int NCH = 8, STEPS = 4, DIV = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sw_we = 0; logic [1:0] sw_addr = 0; logic [NCH-1:0] sw_wdata = 0;
  logic [2:0] n_steps = 3; logic [31:0] step_len = 100, zero_len = 5;
  logic gclk, gdin, gen, zeroing, newp; logic [NCH-1:0] state;
  int checks = 0, failures = 0;

  swap_controller #(.NCH(NCH), .STEPS(STEPS), .GPIO_DIV(DIV)) dut (
    .clk, .rst, .sw_we, .sw_addr, .sw_wdata, .n_steps, .step_len, .zero_len,
    .gpio_clk(gclk), .gpio_din(gdin), .gpio_en(gen), .swap_state(state),
    .zeroing, .new_pattern(newp));

  // external analog board: shift register with latched outputs
  logic [NCH-1:0] sr = 0, latch = 0;
  always @(posedge gclk) sr <= {sr[NCH-2:0], gdin};
  always @(posedge gen) latch <= sr;

  logic [NCH-1:0] pat [3] = '{8'hA5, 8'h3C, 8'h81};
  int nlatch = 0, last_new = -1, cyc = 0, zc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (zeroing) zc++;
    if (newp) begin
      checks++;
      if (latch !== pat[nlatch % 3]) begin failures++; $display("latch %h exp %h", latch, pat[nlatch%3]); end
      checks++;
      if (state !== latch) begin failures++; $display("state %h latch %h", state, latch); end
      if (last_new >= 0) begin
        checks++;
        if (cyc - last_new != 100) begin failures++; $display("step period %0d", cyc - last_new); end
      end
      last_new = cyc;
      nlatch++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      sw_we <= 1; sw_addr <= 2'(i); sw_wdata <= pat[i]; @(posedge clk);
    end
    sw_we <= 0;
    rst <= 0;
    wait (nlatch == 7);
    repeat (20) @(posedge clk);
    checks++;
    if (zc != 7 * 5) begin failures++; $display("zeroing cycles %0d", zc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
