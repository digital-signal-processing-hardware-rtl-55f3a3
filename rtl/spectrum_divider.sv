// spectrum_divider: splits the spectra into NBUS frequency parts, one output
// bus per part, each carrying every channel.
//
// Each input bus carries, per period of FRAME = CH*BINS cycles, CH channels
// one after another, each as BINS consecutive frequency bins. A spectrum
// is cut into NBUS parts of SEG = BINS/NBUS bins, so each bus walks through
// the parts 0,1,..,NBUS-1 once per channel. Input bus i is delayed by i*SEG
// cycles, which staggers the buses so that in every SEG-cycle slot each
// delayed bus shows a different part. Output j takes, in each slot, the
// delayed bus that currently shows part j: bus (slot - j) mod NBUS. No sample
// is lost or repeated; each output runs at the full clock rate.
//
// Output j's period would start j*SEG cycles after the input period; a
// further delay of (NBUS-1-j)*SEG cycles on output j lines all outputs up,
// so they share one sync_out, (NBUS-1)*SEG cycles after the input period
// starts. Each output period holds, in slot s = NBUS*c + i (c = channel on
// input bus i), bins j*SEG .. j*SEG+SEG-1 of that channel, all from the same
// input period: a frame of NBUS*CH "channels" of SEG bins. sync_out
// precedes the first sample of the frames by one cycle.
//
// From the design: a different fixed delay per bus and a multiplexer per
// output part, data from all antennas on each output. This design's choices:
// the delays i*SEG (one delay set shared by all outputs) and the output
// delays that align the four outputs, so each output frame lies within one
// input period and the outputs can share the external memory downstream.
module spectrum_divider
  import omni_pkg::*;
#(
  parameter int unsigned NBUS = 4,    // input buses = output parts
  parameter int unsigned CH   = 8,    // channels per input bus
  parameter int unsigned BINS = 512   // bins per spectrum
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sync_in,
  input  cplx8_t         din      [NBUS],
  output logic           sync_out,
  output cplx8_t         dout     [NBUS]
);
  localparam int unsigned SEG   = BINS / NBUS;
  localparam int unsigned FRAME = CH * BINS;
  localparam int unsigned PW    = $clog2(FRAME);
  localparam int unsigned BW    = (NBUS > 1) ? $clog2(NBUS) : 1;

  logic [PW-1:0] p, p_next;
  logic          seen;          // a sync_in has arrived since reset
  logic [BW-1:0] slot;
  cplx8_t        dly [NBUS];
  cplx8_t        pre [NBUS];    // multiplexer outputs, before alignment

  always_comb begin
    p_next = (sync_in || p == PW'(FRAME - 1)) ? '0 : p + 1;
    slot   = BW'(p / PW'(SEG));
  end

  // per-bus delay of i*SEG cycles
  assign dly[0] = din[0];
  for (genvar i = 1; i < NBUS; i++) begin : g_dly
    localparam int unsigned D  = i * SEG;
    localparam int unsigned DW = $clog2(D);
    cplx8_t         mem [D];
    logic [DW-1:0]  ptr;
    always_ff @(posedge clk) begin
      mem[ptr] <= din[i];
      if (rst) ptr <= '0;
      else     ptr <= (ptr == DW'(D - 1)) ? '0 : ptr + 1;
    end
    assign dly[i] = mem[ptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p <= PW'(FRAME - 1);
      seen <= 1'b0;
      sync_out <= 1'b0;
      for (int j = 0; j < NBUS; j++) pre[j] <= '0;
    end else begin
      p        <= p_next;
      seen     <= seen | sync_in;
      sync_out <= (seen || sync_in) && (p_next == PW'((NBUS - 1) * SEG));
      for (int j = 0; j < NBUS; j++) pre[j] <= dly[BW'(slot - BW'(j))];
    end
  end

  // alignment delay of (NBUS-1-j)*SEG cycles on output j
  assign dout[NBUS-1] = pre[NBUS-1];
  for (genvar j = 0; j < NBUS - 1; j++) begin : g_align
    localparam int unsigned D  = (NBUS - 1 - j) * SEG;
    localparam int unsigned DW = $clog2(D);
    cplx8_t         mem [D];
    logic [DW-1:0]  ptr;
    always_ff @(posedge clk) begin
      mem[ptr] <= pre[j];
      if (rst) ptr <= '0;
      else     ptr <= (ptr == DW'(D - 1)) ? '0 : ptr + 1;
    end
    assign dout[j] = mem[ptr];
  end
endmodule
