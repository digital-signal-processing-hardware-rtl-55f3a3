// snap_monitor: the single snapshot memory used to look inside the
// F-engine while it runs.
//
// NIN taps of the datapath, each already packed into 32 bits with its sign
// bit at bit 31 (zeros padded below), come in with the sync pulse of their
// stage. Software picks one with sel and pulses arm. The block then waits for
// that tap's sync, which comes one cycle before a fresh frame, and stores
// the next DEPTH samples of the tap, one per cycle, so a capture always
// begins at the start of a frame. done goes high when the memory is full and
// stays high until the next arm. Software reads the memory through rd_addr /
// rd_data (one cycle read latency) at any time.
//
// From the design: one snapshot memory for the whole F-engine, a
// software-controlled multiplexer in front of it, 32-bit words with the sign
// bit aligned, capture triggered by the sync pulse. This design's choices:
// the arm/done handshake, DEPTH and the read port.
module snap_monitor #(
  parameter int unsigned NIN   = 8,     // datapath taps
  parameter int unsigned DEPTH = 1024   // samples per capture
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [31:0]              tap_data [NIN],
  input  logic                     tap_sync [NIN],
  input  logic [$clog2(NIN)-1:0]   sel,
  input  logic                     arm,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [31:0]              rd_data,
  output logic                     done
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef enum logic [1:0] {IDLE, WAIT_SYNC, CAPTURE} state_t;

  logic [31:0]   mem [DEPTH];
  state_t        state;
  logic [AW-1:0] waddr;

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (state == CAPTURE) mem[waddr] <= tap_data[sel];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      waddr <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        IDLE:      if (arm) begin state <= WAIT_SYNC; done <= 1'b0; end
        WAIT_SYNC: if (tap_sync[sel]) begin state <= CAPTURE; waddr <= '0; end
        CAPTURE: begin
          waddr <= waddr + 1;
          if (waddr == AW'(DEPTH - 1)) begin state <= IDLE; done <= 1'b1; end
        end
        default:   state <= IDLE;
      endcase
    end
  end
endmodule
