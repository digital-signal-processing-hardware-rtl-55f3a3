// tge_tx_packer: frames one 16-bit sample stream for a 10GbE transmit core.
//
// Four consecutive valid samples are packed into one 64-bit word, the first
// sample in the top 16 bits; the word is presented with tx.valid for one
// cycle. Every PKT-th word also carries tx.eof, which tells the core to send
// the packet it has buffered. sync_in (one cycle before the first sample of a
// transposer block) restarts both the word and the packet count, so packets
// always start at a block boundary; with the default sizes one packet is
// exactly one cross-correlator window (2048 samples). Samples with
// in_valid low are dropped.
//
// Timing: the word holding samples k..k+3 leaves in the cycle after sample
// k+3 arrives.
//
// From the design: 64-bit data, a valid line, an end-of-frame pulse with
// the last word's valid, 512-word packets. This design's choices: sample
// order in the word and the restart on sync.
module tge_tx_packer
  import omni_pkg::*;
#(
  parameter int unsigned PKT = 512   // words per packet
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      sync_in,
  input  logic      in_valid,
  input  cplx8_t    din,
  output tge_word_t tx
);
  localparam int unsigned PW = $clog2(PKT);

  logic [1:0]    lane;
  logic [47:0]   acc;
  logic [PW-1:0] wcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      lane <= '0;
      acc  <= '0;
      wcnt <= '0;
      tx   <= '0;
    end else begin
      tx.valid <= 1'b0;
      tx.eof   <= 1'b0;
      if (sync_in) begin
        lane <= '0;
        wcnt <= '0;
      end else if (in_valid) begin
        lane <= lane + 1;
        if (lane == 2'd3) begin
          tx.valid <= 1'b1;
          tx.data  <= {acc, din};
          tx.eof   <= (wcnt == PW'(PKT - 1));
          wcnt     <= (wcnt == PW'(PKT - 1)) ? '0 : wcnt + 1;
        end else begin
          acc <= {acc[31:0], din};
        end
      end
    end
  end
endmodule
