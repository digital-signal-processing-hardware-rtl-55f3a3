// vacc: vector accumulator held in two external QDR SRAMs.
//
// Valid baselines from the cross-correlator (out_valid with a valid window)
// are numbered 0..VLEN-1 as they arrive, VLEN = bins x baselines, and
// wrap; element k of every vector is added into word k, the real part in
// SRAM 0 and the imaginary part in SRAM 1 (36-bit words). After acc_len
// vectors the accumulation is finished: each element's final sum is sent
// out on the dump port as it is formed, and the next accumulation starts
// from zero (its first vector overwrites the stored sums instead of adding
// to them), so accumulations follow each other with no gap.
//
// Each element is a read-modify-write: the read is issued when the element
// arrives, and QDR_RD_LAT cycles later the returned word plus the new value
// is written back to the same address. Since an address recurs only once per
// vector, the read never sees a stale word.
//
// Interface: acc_len (vectors per accumulation) is sampled when an
// accumulation starts; acc_num counts finished accumulations and tags the
// dumped words. Dumped elements leave QDR_RD_LAT+2 cycles after their last
// input. Junk windows and cycles without out_valid are ignored, so the
// vector index only moves on real data.
//
// From the design: vector length 128 x 528 = 67584, QDR storage split into
// real and imaginary SRAMs, accumulation length 1024..8192 set by the user,
// 8192 as the limit of the stored word (23-bit correlator sums plus 13 bits).
// This design's choices: the read-modify-write pipeline, zero-based restart
// and the dump port. The vector index restarts only at reset.
//
// The top 3 bits of every QDR address are always 0: 67584 words need
// 17 of the 20 address bits.
module vacc
  import omni_pkg::*;
#(
  parameter int unsigned VLEN  = 128 * 528,
  parameter int unsigned IN_W  = 23
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic [13:0]             acc_len,     // 1..8192 vectors
  output qdr_req_t                qdr_req [2], // 0: real, 1: imaginary
  input  qdr_rsp_t                qdr_rsp [2],
  output logic                    dump_valid,
  output logic [$clog2(VLEN)-1:0] dump_idx,
  output logic signed [QDR_DW-1:0] dump_re,
  output logic signed [QDR_DW-1:0] dump_im,
  output logic [31:0]             acc_num
);
  localparam int unsigned IW = $clog2(VLEN);
  localparam int unsigned L  = QDR_RD_LAT;

  typedef struct packed {
    logic                   v;
    logic                   first;
    logic                   last;
    logic [IW-1:0]          idx;
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } tag_t;

  tag_t          tag [L+1];
  logic [IW-1:0] idx;
  logic [13:0]   pass, len;
  logic signed [QDR_DW-1:0] sum_re, sum_im;

  always_comb begin
    sum_re = (tag[L].first ? '0 : $signed(qdr_rsp[0].rdata)) + QDR_DW'(tag[L].re);
    sum_im = (tag[L].first ? '0 : $signed(qdr_rsp[1].rdata)) + QDR_DW'(tag[L].im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx        <= '0;
      pass       <= '0;
      len        <= (acc_len == 0) ? 14'd1 : acc_len;
      acc_num    <= '0;
      dump_valid <= 1'b0;
      dump_idx   <= '0;
      dump_re    <= '0;
      dump_im    <= '0;
      for (int k = 0; k <= L; k++) tag[k] <= '0;
      for (int s = 0; s < 2; s++) qdr_req[s] <= '0;
    end else begin
      // issue the read for an arriving element
      tag[0] <= '{v: in_valid, first: (pass == 0), last: (pass == len - 1),
                  idx: idx, re: in_re, im: in_im};
      for (int k = 1; k <= L; k++) tag[k] <= tag[k-1];
      for (int s = 0; s < 2; s++) begin
        qdr_req[s].rd    <= in_valid;
        qdr_req[s].raddr <= QDR_AW'(idx);
      end
      if (in_valid) begin
        if (idx == IW'(VLEN - 1)) begin
          idx <= '0;
          if (pass == len - 1) begin
            pass <= '0;
            len  <= (acc_len == 0) ? 14'd1 : acc_len;
          end else begin
            pass <= pass + 1;
          end
        end else begin
          idx <= idx + 1;
        end
      end
      // write back when the word returns
      qdr_req[0].wr    <= tag[L].v;
      qdr_req[1].wr    <= tag[L].v;
      qdr_req[0].waddr <= QDR_AW'(tag[L].idx);
      qdr_req[1].waddr <= QDR_AW'(tag[L].idx);
      qdr_req[0].wdata <= sum_re;
      qdr_req[1].wdata <= sum_im;
      dump_valid <= tag[L].v && tag[L].last;
      dump_idx   <= tag[L].idx;
      dump_re    <= sum_re;
      dump_im    <= sum_im;
      if (dump_valid && dump_idx == IW'(VLEN - 1)) acc_num <= acc_num + 1;
    end
  end
endmodule
