// Tunable interpolated filter: L+1 sub-filters combined by a tuning value
// alpha, a complementary branch and two masking filters summed by one adder.
//
// All sub-filters see the same input sample x, the same interpolation factor
// (sel_m) and the same add/subtract select. Their outputs S1 .. S(L+1) are
// combined in a multiply-add chain (Horner form) with the tuning input alpha:
//   H_A = S1 + alpha*(S2 + alpha*(S3 + ... + alpha*S(L+1))),
// so alpha moves the response continuously without new coefficients. The
// complementary branch is H_C = z^-D x - H_A, with D the sub-filters' group
// delay. Mask 1 filters H_C, mask 2 filters H_A, and the adder sums the tap
// products of both masks into the output y, which is registered.
//
// Arrangement (sub-filters L+1 .. 1, alpha multipliers and adders in a chain,
// complementary delays driven by select M, subtraction giving H_C, masks 1
// and 2 on H_C and H_A, one adder) follows the published block diagram.
// The diagram also draws the input into the final adder without saying with
// what weight; this design does not add it. Number formats: alpha and all
// coefficients are signed Q1.7 (alpha = 128 would be 1.0; the 8-bit range is
// -1.0 .. +0.992), sub-filter outputs, H_A, H_C and y are Q.7 multiples of
// the input. The alpha products are truncated (arithmetic shift) and all
// sums wrap in the 24-bit word. Sizes and coefficients are in ispa_pkg.
//
// Timing: one input sample per clock with en high. H_A and H_C are
// combinational from x and the stored samples; y is registered, so it
// appears one clock (with en) after its sample. rst_n clears all registers.
module ispa_frm_filter #(
  parameter ispa_pkg::spa_coefs_t  SUB_COEFS   = ispa_pkg::SUB_COEFS,
  parameter ispa_pkg::mask_coefs_t MASK1_COEFS = ispa_pkg::MASK1_COEFS,
  parameter ispa_pkg::mask_coefs_t MASK2_COEFS = ispa_pkg::MASK2_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  ispa_pkg::sample_t       x,
  input  logic [ispa_pkg::M_W-1:0] sel_m,
  input  logic                    sel_sub,
  input  ispa_pkg::coef_t         alpha,
  output ispa_pkg::word_t         h_a,
  output ispa_pkg::word_t         h_c,
  output ispa_pkg::word_t         y
);
  import ispa_pkg::*;

  word_t s     [NSUB];        // sub-filter outputs, s[0] is sub-filter 1
  word_t chain [NSUB];        // chain[k]: Horner value after sub-filter k+1
  word_t xd;
  word_t m1 [MASK_TAPS];
  word_t m2 [MASK_TAPS];
  word_t total;

  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    ispa_subfilter #(.NTAPS(SUB_TAPS), .MAX_M(MAX_M), .H(SUB_COEFS[k])) u_sub (
      .clk, .rst_n, .en, .x, .sel_m, .sel_sub, .y(s[k]));
  end

  // Horner chain, from sub-filter L+1 down to sub-filter 1.
  assign chain[NSUB-1] = s[NSUB-1];
  for (genvar k = NSUB - 2; k >= 0; k--) begin : g_horner
    logic signed [W+COEF_W-1:0] scaled;
    assign scaled   = (chain[k+1] * alpha) >>> FRAC;
    assign chain[k] = W'(scaled) + s[k];
  end
  assign h_a = chain[0];

  complementary_delay #(.NTAPS(SUB_TAPS), .MAX_M(MAX_M)) u_cdel (
    .clk, .rst_n, .en, .x, .sel_m, .xd);

  assign h_c = xd - h_a;

  mask_filter #(.NTAPS(MASK_TAPS), .G(MASK1_COEFS)) u_mask1 (
    .clk, .rst_n, .en, .din(h_c), .taps(m1));
  mask_filter #(.NTAPS(MASK_TAPS), .G(MASK2_COEFS)) u_mask2 (
    .clk, .rst_n, .en, .din(h_a), .taps(m2));

  always_comb begin
    total = '0;
    for (int k = 0; k < MASK_TAPS; k++) total = total + m1[k] + m2[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= total;
  end
endmodule
