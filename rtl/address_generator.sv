// Tap address generator of the FIR filter.
//
// A counter that names the tap being processed: the same address reads the
// sample RAM and the coefficient ROM. clear (synchronous, from the control
// circuit) returns it to tap 0; each clock with en high moves it to the next
// tap, wrapping after tap TAPS-1. last is high while the address is the final
// tap. One address per tap and eight addresses for eight taps follow the
// published design; the counter form and the clear/enable controls are this
// design's choices. rst_n is an asynchronous active-low reset.
module address_generator #(
  parameter int unsigned TAPS = fir_pkg::TAPS,
  localparam int unsigned AW  = $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (clear) addr <= '0;
    else if (en)    addr <= (addr == AW'(TAPS - 1)) ? '0 : addr + 1'b1;
  end

  assign last = (addr == AW'(TAPS - 1));
endmodule
