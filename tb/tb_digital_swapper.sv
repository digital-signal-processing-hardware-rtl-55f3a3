// Testbench for digital_swapper: random samples on bus 2 under random swap
// words; checks each output against the sample negated (with saturation)
// exactly when the bit of its channel is set, plus the blanking flag.
module tb_digital_swapper;
  localparam int W = 12, MUX = 4, NCH = 64, BUS = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, zeroing = 0, sync_out, zflag;
  logic signed [W-1:0] din = 0, dout;
  logic [NCH-1:0] swap_state = 0;
  int checks = 0, failures = 0;

  digital_swapper #(.BUS(BUS), .MUX(MUX), .NCH(NCH), .W(W)) dut (.*);

  initial begin
    logic signed [W-1:0] exp_d;
    int slot;
    repeat (2) @(posedge clk);
    rst <= 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    slot = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 50 == 0) swap_state <= {$urandom, $urandom};
      din <= (i % 97 == 0) ? 12'sh800 : W'($urandom);
      zeroing <= ($urandom % 8) == 0;
      @(posedge clk);
      #1;
      exp_d = din;
      if (swap_state[BUS*MUX + slot]) exp_d = (din == 12'sh800) ? 12'sh7ff : -din;
      checks++;
      if (dout !== exp_d || zflag !== zeroing) begin
        failures++;
        if (failures < 10) $display("i=%0d slot=%0d din=%0d dout=%0d exp=%0d", i, slot, din, dout, exp_d);
      end
      slot = (slot + 1) % MUX;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
