// swap_controller: master controller of the cross-talk swapper.
//
// A pattern RAM holds one word per time step, bit c set meaning "invert
// channel c". Software writes the RAM through the sw_* port and sets how many
// steps to cycle through (n_steps) and how long each step lasts (step_len
// clock cycles). At the start of every step the controller fetches the next
// word and shifts it out on three GPIO lines to the external shift register
// and latches of the analog swapper: gpio_din holds a bit for a whole
// gpio_clk period, the shift register takes it on the rising edge of
// gpio_clk, and after all NCH bits a single gpio_en pulse moves the word onto
// the latch outputs. In the cycle the enable pulse ends the same word becomes
// swap_state, which the digital swappers use to undo the inversion, and
// `zeroing` is raised for zero_len cycles so the samples hit by the switch
// transient can be blanked downstream.
//
// From the design: one bit per channel per time step, a 64-bit word per RAM
// address, clock + data + enable to a 64-bit shift register with latches,
// and blanking for a user-set time after each new pattern. This design's
// choices: the most significant bit (channel NCH-1) is shifted first, so it
// ends at the far end of the chain; gpio_clk runs at clk/(2*GPIO_DIV); the
// enable pulse lasts GPIO_DIV cycles; step_len must exceed the
// (2*NCH+2)*GPIO_DIV cycles a transfer takes; after reset swap_state is all
// zeros and step 0 starts immediately.
module swap_controller #(
  parameter int unsigned NCH      = 64,   // channels (bits per pattern word)
  parameter int unsigned STEPS    = 256,  // pattern RAM depth
  parameter int unsigned GPIO_DIV = 4     // half-period of gpio_clk in cycles
) (
  input  logic                     clk,
  input  logic                     rst,
  // software side of the pattern RAM
  input  logic                     sw_we,
  input  logic [$clog2(STEPS)-1:0] sw_addr,
  input  logic [NCH-1:0]           sw_wdata,
  input  logic [$clog2(STEPS):0]   n_steps,    // steps in the pattern (1..STEPS)
  input  logic [31:0]              step_len,   // cycles per step
  input  logic [31:0]              zero_len,   // blanking cycles after a switch
  // to the analog swapper board
  output logic                     gpio_clk,
  output logic                     gpio_din,
  output logic                     gpio_en,
  // to the digital swappers
  output logic [NCH-1:0]           swap_state,
  output logic                     zeroing,
  output logic                     new_pattern  // one-cycle pulse when swap_state changes
);
  localparam int unsigned SW = $clog2(STEPS);

  typedef enum logic [1:0] {IDLE, SHIFT, ENABLE} state_t;

  logic [NCH-1:0] pattern [STEPS];
  logic [SW-1:0]  step;
  logic [31:0]    step_cnt;
  logic [31:0]    zero_cnt;
  state_t         state;
  logic [NCH-1:0] shreg;
  logic [NCH-1:0] word;       // word being transferred
  logic [$clog2(NCH+1)-1:0] bits_left;
  logic [$clog2(2*GPIO_DIV)-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (sw_we) pattern[sw_addr] <= sw_wdata;
  end

  always_ff @(posedge clk) begin
    new_pattern <= 1'b0;
    if (rst) begin
      step       <= '0;
      step_cnt   <= '0;
      zero_cnt   <= '0;
      state      <= IDLE;
      shreg      <= '0;
      word       <= '0;
      bits_left  <= '0;
      div_cnt    <= '0;
      gpio_clk   <= 1'b0;
      gpio_din   <= 1'b0;
      gpio_en    <= 1'b0;
      swap_state <= '0;
    end else begin
      if (zero_cnt != 0) zero_cnt <= zero_cnt - 1;
      // step timer: a new transfer starts when the count wraps
      if (step_cnt == 0) begin
        step_cnt  <= step_len - 1;
        shreg     <= pattern[step];
        word      <= pattern[step];
        bits_left <= ($clog2(NCH+1))'(NCH);
        div_cnt   <= '0;
        state     <= SHIFT;
        step      <= ({1'b0, step} + 1 >= ($clog2(STEPS)+1)'(n_steps)) ? '0 : step + 1;
      end else begin
        step_cnt <= step_cnt - 1;
      end
      unique case (state)
        IDLE: ;
        SHIFT: begin
          // low half of gpio_clk: present data; high half: shift register samples it
          div_cnt <= (div_cnt == ($clog2(2*GPIO_DIV))'(2*GPIO_DIV-1)) ? '0 : div_cnt + 1;
          if (div_cnt == 0) begin
            gpio_clk <= 1'b0;
            gpio_din <= shreg[NCH-1];
          end else if (div_cnt == ($clog2(2*GPIO_DIV))'(GPIO_DIV)) begin
            gpio_clk  <= 1'b1;
          end else if (div_cnt == ($clog2(2*GPIO_DIV))'(2*GPIO_DIV-1)) begin
            shreg     <= {shreg[NCH-2:0], 1'b0};
            bits_left <= bits_left - 1;
            if (bits_left == 1) begin
              state   <= ENABLE;
            end
          end
        end
        ENABLE: begin
          gpio_clk <= 1'b0;
          gpio_din <= 1'b0;
          div_cnt  <= div_cnt + 1;
          if (div_cnt == 0) gpio_en <= 1'b1;
          else if (div_cnt == ($clog2(2*GPIO_DIV))'(GPIO_DIV)) begin
            gpio_en     <= 1'b0;
            swap_state  <= word;
            zero_cnt    <= zero_len;
            new_pattern <= 1'b1;
            state       <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign zeroing = (zero_cnt != 0);

endmodule
