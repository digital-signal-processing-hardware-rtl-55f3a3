// digital_swapper: undoes the analog inversion on one ADC bus.
//
// An ADC bus carries MUX channels time-multiplexed sample by sample: the
// cycle after sync carries channel BUS*MUX+0, the next BUS*MUX+1, and so on,
// repeating. For each sample the block looks up the channel's bit in the
// current swap word from swap_controller and, if set, negates the sample
// (the most negative code saturates to the most positive). Samples that
// arrive while the controller is blanking after a switch are passed on with
// zflag set; the polyphase filter blanks every output they contribute to.
// One cycle of latency; sync_out is sync_in delayed to match.
//
// From the design: one swap bit per channel, de-inversion right after the
// ADC, blanking after each new pattern. This design's choices: the channel
// numbering BUS*MUX+slot and the saturating negation.
module digital_swapper #(
  parameter int unsigned BUS = 0,    // index of this ADC bus
  parameter int unsigned MUX = 4,    // channels per bus
  parameter int unsigned NCH = 64,   // width of the swap word
  parameter int unsigned W   = 12    // sample width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync_in,
  input  logic signed [W-1:0] din,
  input  logic [NCH-1:0]      swap_state,
  input  logic                zeroing,
  output logic                sync_out,
  output logic signed [W-1:0] dout,
  output logic                zflag
);
  logic [$clog2(MUX)-1:0] slot;
  logic                   inv;

  always_comb inv = swap_state[BUS*MUX + 32'(slot)];

  always_ff @(posedge clk) begin
    if (rst) begin
      slot     <= '0;
      sync_out <= 1'b0;
      dout     <= '0;
      zflag    <= 1'b0;
    end else begin
      slot     <= sync_in ? '0 : slot + 1;
      sync_out <= sync_in;
      zflag    <= zeroing;
      if (!inv)                                 dout <= din;
      else if (din == {1'b1, {(W-1){1'b0}}})    dout <= {1'b0, {(W-1){1'b1}}};
      else                                      dout <= -din;
    end
  end
endmodule
