// Control circuit of the FIR filter: sequences one filter output.
//
// States: IDLE waits for start. The clock on which start is seen in IDLE
// raises clear for one cycle, which zeroes the accumulator and returns the
// address generator to tap 0. RUN then raises mac_en for exactly TAPS clocks,
// one tap per clock, and leaves when the address generator reports the last
// tap. DONE raises done for one clock, when the accumulator holds the
// finished sum, and returns to IDLE. start is ignored while busy. So a result
// is ready TAPS + 1 clocks after the clock that takes start.
// The published design names a control circuit that governs clock and reset
// and a filter that finishes after eight taps in eight clocks; the states, the
// start/done handshake and the clear pulse are this design's choices.
// rst_n is an asynchronous active-low reset.
module control_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic last,    // address generator is at the final tap
  output logic clear,   // synchronous clear of accumulator and address
  output logic mac_en,  // accumulate the current tap
  output logic busy,
  output logic done     // one-clock pulse: accumulator holds the result
);
  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;
  state_t state, state_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    clear    = 1'b0;
    mac_en   = 1'b0;
    done     = 1'b0;
    unique case (state)
      IDLE: if (start) begin
        clear    = 1'b1;
        state_nx = RUN;
      end
      RUN: begin
        mac_en = 1'b1;
        if (last) state_nx = DONE;
      end
      DONE: begin
        done     = 1'b1;
        state_nx = IDLE;
      end
      default: state_nx = IDLE;
    endcase
  end

  assign busy = (state != IDLE);
endmodule
