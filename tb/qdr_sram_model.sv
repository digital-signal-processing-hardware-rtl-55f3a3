// qdr_sram_model: behavioural model of one external QDR SRAM for the
// testbenches. One write and one read may be presented each cycle
// (qdr_req sampled on the rising edge); read data appears on qdr_rsp
// omni_pkg::QDR_RD_LAT rising edges after the read was sampled. DEPTH_W sets
// how many address bits are stored; higher address bits are ignored.
// Contents start at zero.
module qdr_sram_model
  import omni_pkg::*;
#(
  parameter int unsigned DEPTH_W = QDR_AW
) (
  input  logic     clk,
  input  qdr_req_t qdr_req,
  output qdr_rsp_t qdr_rsp
);
  logic [QDR_DW-1:0] mem [1 << DEPTH_W];
  qdr_rsp_t          pipe [QDR_RD_LAT];
  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (pipe[i]) pipe[i] = '0;
  end
  always @(posedge clk) begin
    if (qdr_req.wr) mem[qdr_req.waddr[DEPTH_W-1:0]] <= qdr_req.wdata;
    pipe[0].rvalid <= qdr_req.rd;
    pipe[0].rdata  <= mem[qdr_req.raddr[DEPTH_W-1:0]];
    for (int i = 1; i < QDR_RD_LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign qdr_rsp = pipe[QDR_RD_LAT-1];
endmodule
