// Complementary delay of the interpolated filter structure.
//
// Delays the input by the group delay of the sub-filters, D = (NTAPS-1)/2 * M
// samples for the selected M, and scales it to the Q.FRAC format of the
// sub-filter outputs, so that subtracting the combined sub-filter output from
// it gives the complementary response H_C = z^-D - H_A. A shift register of
// (NTAPS-1)/2 * MAX_M stages is read at stage D (sel_m of 0 is taken as 1).
// That a complementary delay controlled by select M feeds the subtraction
// follows the published block diagram; its length and form are this design's
// choices. Registers move on clocks with en high; rst_n clears them. The
// low FRAC bits of xd are always 0 because of the scaling.
module complementary_delay #(
  parameter int unsigned  NTAPS = ispa_pkg::SUB_TAPS,
  parameter int unsigned  MAX_M = ispa_pkg::MAX_M,
  localparam int unsigned HALF  = (NTAPS - 1) / 2,
  localparam int unsigned DEPTH = HALF * MAX_M,
  localparam int unsigned MW    = $clog2(MAX_M + 1),
  localparam int unsigned DW    = $clog2(DEPTH + 1),
  localparam int unsigned IW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  ispa_pkg::sample_t x,
  input  logic [MW-1:0]     sel_m,
  output ispa_pkg::word_t   xd      // x(n - D) * 2^FRAC
);
  import ispa_pkg::*;

  sample_t       line [DEPTH];
  logic [MW-1:0] m_eff;
  logic [DW-1:0] d;

  assign m_eff = (sel_m == '0) ? MW'(1) : (sel_m > MW'(MAX_M) ? MW'(MAX_M) : sel_m);
  assign d     = DW'(HALF) * DW'(m_eff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else if (en) begin
      line[0] <= x;
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end

  assign xd = W'(line[IW'(d - 1'b1)]) <<< FRAC;
endmodule
