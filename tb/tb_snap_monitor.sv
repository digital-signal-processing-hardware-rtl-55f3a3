// Testbench for snap_monitor with 4 taps and 64-word captures. Each tap
// counts up from its own base and pulses its own sync at its own phase.
// After arming with a tap selected, the captured memory must hold the 64
// values of that tap that follow its first sync after arming.
module tb_snap_monitor;
  localparam int NIN = 4, DEPTH = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] tap_data [NIN];
  logic tap_sync [NIN];
  logic [1:0] sel = 0; logic arm = 0; logic [5:0] rd_addr = 0;
  logic [31:0] rd_data; logic done;
  int checks = 0, failures = 0, cyc = 0;

  snap_monitor #(.NIN(NIN), .DEPTH(DEPTH)) dut (.*);

  // tap i: value = i<<24 | cycle, sync every 100 cycles at phase 17*i
  always_comb for (int i = 0; i < NIN; i++) begin
    tap_data[i] = (32'(i) << 24) | 32'(cyc);
    tap_sync[i] = (cyc % 100) == 17 * i;
  end
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int round = 0; round < 6; round++) begin
      int s, start;
      s = round % NIN;
      repeat ($urandom % 150) @(posedge clk);
      sel <= 2'(s); arm <= 1; @(posedge clk); arm <= 0;
      // first sync of tap s from the cycle after arming
      @(posedge clk);
      while (!tap_sync[s]) @(posedge clk);
      start = cyc + 1;
      wait (done);
      @(posedge clk);
      for (int a = 0; a < DEPTH; a++) begin
        rd_addr <= 6'(a); @(posedge clk); #1;
        checks++;
        if (rd_data !== ((32'(s) << 24) | 32'(start + a))) begin
          failures++;
          if (failures < 10) $display("round %0d a %0d got %h exp %h", round, a, rd_data, (32'(s) << 24) | 32'(start + a));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
