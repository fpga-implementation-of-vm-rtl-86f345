// Masking filter of the interpolated filter structure, as a tapped delay line.
//
// Holds the last NTAPS values of its input (the current one and NTAPS-1
// registered ones) and brings out each multiplied by its coefficient G[k];
// the final adder of the structure sums these products, so the mask and the
// adder together form an FIR filter. Only the 8 most significant bits that
// carry the input's range are multiplied: the input word is scaled down by
// FRAC bits (it is in Q.FRAC) and saturated to 8 signed bits before the
// Vedic multiplier, so each product is in Q.FRAC of the input range again.
// Two masks, one on the complementary branch and one on the direct branch,
// each with several outputs into one adder, follow the published block
// diagram; the tap count, the coefficients, the saturation and the use of
// the Vedic multiplier are this design's choices. Registers move on clocks
// with en high; rst_n clears them.
module mask_filter #(
  parameter int unsigned     NTAPS = ispa_pkg::MASK_TAPS,
  parameter ispa_pkg::coef_t [0:NTAPS-1] G = ispa_pkg::MASK1_COEFS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  ispa_pkg::word_t     din,
  output ispa_pkg::word_t     taps [NTAPS]
);
  import ispa_pkg::*;

  sample_t            hist_q [NTAPS-1];  // hist_q[i] is the sample i+1 steps back
  sample_t            din_s;
  word_t              scaled;
  logic signed [15:0] prod [NTAPS];

  always_comb begin
    scaled = din >>> FRAC;
    if (scaled > W'(127))       din_s = 8'sd127;
    else if (scaled < -W'(128)) din_s = -8'sd128;
    else                        din_s = sample_t'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) hist_q[i] <= '0;
    end else if (en) begin
      hist_q[0] <= din_s;
      for (int i = 1; i < NTAPS - 1; i++) hist_q[i] <= hist_q[i-1];
    end
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    sample_t tap_in;
    if (k == 0) begin : g_now
      assign tap_in = din_s;
    end else begin : g_past
      assign tap_in = hist_q[k-1];
    end
    signed_vedic_mult u_mul (.a(tap_in), .b(G[k]), .p(prod[k]));
    assign taps[k] = W'(prod[k]);
  end
endmodule
