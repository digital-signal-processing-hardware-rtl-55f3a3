// vacc_readout: the small shared memory through which software collects
// finished accumulations.
//
// The vector accumulator dumps each final element (real and imaginary sums,
// element index, accumulation number) as it is formed; this block queues
// them in a DEPTH-word first-in first-out memory. Software polls `level`
// (how full the memory is) and empties it with sw_pop, one word per pop;
// the popped word is on sw_data the cycle after the pop. When software
// falls behind and the memory is full, arriving words are dropped and the
// sticky `lost` flag is set (cleared by sw_clear). Software can tell the end
// of an accumulation from the element index or from the memory staying
// empty.
//
// From the design: a small memory shared with software that the
// accumulator fills and software drains, repeatedly, until a whole
// accumulation is out, because the output rate is low. This design's
// choices: first-in first-out order, DEPTH, the word layout and the
// lost-data flag.
module vacc_readout
  import omni_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned IW    = 17     // element index width
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      dump_valid,
  input  logic [IW-1:0]             dump_idx,
  input  logic signed [QDR_DW-1:0]  dump_re,
  input  logic signed [QDR_DW-1:0]  dump_im,
  input  logic [31:0]               acc_num,
  input  logic                      sw_pop,
  input  logic                      sw_clear,
  output logic [2*QDR_DW+IW+32-1:0] sw_data,   // {acc_num, idx, re, im}
  output logic [$clog2(DEPTH):0]    level,
  output logic                      lost
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned WW = 2 * QDR_DW + IW + 32;

  logic [WW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          push, pop;

  always_comb begin
    push = dump_valid && (level != (AW+1)'(DEPTH));
    pop  = sw_pop && (level != 0);
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= {acc_num, dump_idx, dump_re, dump_im};
    if (pop)  sw_data   <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
      lost  <= 1'b0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1;
      if (pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
      if (sw_clear)                    lost <= 1'b0;
      else if (dump_valid && !push)    lost <= 1'b1;
    end
  end
endmodule
