// Testbench for vacc_readout with an 8-word memory. A producer dumps
// numbered words in bursts while a slower software model pops them; every
// popped word must be the next one in order, level must track the number
// held, and a burst into a full memory must set `lost` (cleared by sw_clear).
module tb_vacc_readout;
  import omni_pkg::*;
  localparam int DEPTH = 8, IW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic dump_valid = 0; logic [IW-1:0] dump_idx = 0;
  logic signed [35:0] dump_re = 0, dump_im = 0; logic [31:0] acc_num = 0;
  logic sw_pop = 0, sw_clear = 0;
  logic [2*36+IW+32-1:0] sw_data;
  logic [3:0] level; logic lost;
  int checks = 0, failures = 0, nin = 0, nout = 0;

  vacc_readout #(.DEPTH(DEPTH), .IW(IW)) dut (.*);

  function automatic logic [2*36+IW+32-1:0] word(int n);
    return {32'(n / 32), IW'(n % 32), 36'(n * 3), 36'(-n)};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // phase 1: producer at most as fast as the reader can keep up
    fork
      for (int n = 0; n < 200; n++) begin
        repeat (3 + $urandom % 4) @(posedge clk);
        {acc_num, dump_idx, dump_re, dump_im} <= word(n);
        dump_valid <= 1; @(posedge clk); dump_valid <= 0;
        nin++;
      end
      while (nout < 200) begin
        @(posedge clk);
        if (level != 0 && $urandom % 2 == 0) begin
          sw_pop <= 1; @(posedge clk); sw_pop <= 0; @(posedge clk);
          checks++;
          if (sw_data !== word(nout)) begin failures++; if (failures < 10) $display("pop %0d got %h", nout, sw_data); end
          nout++;
        end
      end
    join
    checks++;
    if (lost || level != 0) begin failures++; $display("lost %0d level %0d", lost, level); end
    // phase 2: 12 words into 8 places
    for (int n = 0; n < 12; n++) begin dump_valid <= 1; {acc_num, dump_idx, dump_re, dump_im} <= word(n); @(posedge clk); end
    dump_valid <= 0; @(posedge clk);
    checks++;
    if (!lost || level != DEPTH) begin failures++; $display("full: lost %0d level %0d", lost, level); end
    sw_clear <= 1; @(posedge clk); sw_clear <= 0; @(posedge clk);
    checks++;
    if (lost) failures++;
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
