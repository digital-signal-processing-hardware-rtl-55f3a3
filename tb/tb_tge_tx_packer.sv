// Testbench for tge_tx_packer with 8-word packets: a random sample stream
// with random gaps in in_valid and a sync at the start. Checks each word's
// contents (four samples, first on top), that eof marks every 8th word and
// that a second sync restarts the packet count.
module tb_tge_tx_packer;
  import omni_pkg::*;
  localparam int PKT = 8, NSMP = 1000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sync_in = 0, in_valid = 0;
  cplx8_t din = '0;
  tge_word_t tx;
  int checks = 0, failures = 0, nword = 0, neof = 0;
  cplx8_t q [$];

  tge_tx_packer #(.PKT(PKT)) dut (.*);

  always @(posedge clk) if (!rst && tx.valid) begin
    logic [63:0] e;
    e = {q[0], q[1], q[2], q[3]};
    repeat (4) void'(q.pop_front());
    checks++;
    if (tx.data !== e || tx.eof !== ((nword % PKT) == PKT - 1)) begin
      failures++;
      if (failures < 10) $display("word %0d got %h exp %h eof %0d", nword, tx.data, e, tx.eof);
    end
    if (tx.eof) neof++;
    nword++;
  end

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom % 3 == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; din <= cplx8_t'($urandom); q.push_back(din); @(posedge clk);
      q[$] = din;
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    send(NSMP);
    repeat (3) @(posedge clk);
    // restart mid-packet: 10 words then a sync, then a new packet count
    q.delete(); nword = 0;
    sync_in <= 1; @(posedge clk); sync_in <= 0;
    send(4 * PKT * 2);
    repeat (3) @(posedge clk);
    checks++;
    if (neof != NSMP / 4 / PKT + 2) begin failures++; $display("eof count %0d", neof); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
