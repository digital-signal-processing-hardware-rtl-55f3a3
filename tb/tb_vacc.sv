// Testbench for vacc with a 10-element vector against two QDR SRAM models.
// Random values arrive with random gaps; accumulations of 3 vectors, then
// of 2 after acc_len is changed. Each dumped element must be the sum of that
// element over its accumulation's vectors, dumped in index order, with the
// right accumulation number; the first dump must come from stored sums read
// back from the SRAMs (sums of 3 differ from any single input).
module tb_vacc;
  import omni_pkg::*;
  localparam int VLEN = 10, IN_W = 23, NACC = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_re = 0, in_im = 0;
  logic [13:0] acc_len = 3;
  qdr_req_t qdr_req [2]; qdr_rsp_t qdr_rsp [2];
  logic dump_valid; logic [3:0] dump_idx;
  logic signed [35:0] dump_re, dump_im;
  logic [31:0] acc_num;
  int checks = 0, failures = 0, ndump = 0;
  longint sre [NACC][VLEN], sim [NACC][VLEN];
  int lens [NACC] = '{3, 3, 2, 2, 2, 2};

  vacc #(.VLEN(VLEN), .IN_W(IN_W)) dut (.*);
  qdr_sram_model #(.DEPTH_W(8)) u_re (.clk, .qdr_req(qdr_req[0]), .qdr_rsp(qdr_rsp[0]));
  qdr_sram_model #(.DEPTH_W(8)) u_im (.clk, .qdr_req(qdr_req[1]), .qdr_rsp(qdr_rsp[1]));

  always @(posedge clk) if (!rst && dump_valid) begin
    int a, k;
    a = ndump / VLEN; k = ndump % VLEN;
    checks++;
    if (a >= NACC || dump_idx != 4'(k) || longint'(dump_re) != sre[a][k] || longint'(dump_im) != sim[a][k] || acc_num != 32'(a)) begin
      failures++;
      if (failures < 10) $display("acc %0d k %0d got idx %0d %0d,%0d exp %0d,%0d num %0d", a, k, dump_idx, dump_re, dump_im, sre[a][k], sim[a][k], acc_num);
    end
    ndump++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int a = 0; a < NACC; a++) begin
      if (a == 1) acc_len <= 2;    // takes effect for accumulation 2
      for (int k = 0; k < VLEN; k++) begin sre[a][k] = 0; sim[a][k] = 0; end
      for (int v = 0; v < lens[a]; v++)
        for (int k = 0; k < VLEN; k++) begin
          logic signed [IN_W-1:0] r, i;
          while ($urandom % 3 == 0) begin in_valid <= 0; @(posedge clk); end
          r = IN_W'($urandom); i = (a == 0 && k == 0) ? 23'sh3fffff : IN_W'($urandom);
          sre[a][k] += r; sim[a][k] += i;
          in_valid <= 1; in_re <= r; in_im <= i; @(posedge clk);
        end
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (ndump != NACC * VLEN) begin failures++; $display("dumped %0d", ndump); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
