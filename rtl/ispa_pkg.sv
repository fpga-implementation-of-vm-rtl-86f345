// Sizes, fixed-point format and default coefficients of the tunable
// interpolated filter structure (sub-filters combined by a tuning value
// alpha, complementary branch and two masking filters).
//
// The published structure gives the arrangement only: L+1 sub-filters whose
// delays are z^-M, a chain of multiplications by alpha and additions, a
// complementary delay, and two masks feeding one adder. Every number here is
// this design's choice: 8-bit signed samples and coefficients, coefficients
// and alpha in Q1.7 (128 stands for 1.0), a 24-bit signed internal word,
// five taps per sub-filter, M selectable from 1 to 4, L = 3 (four
// sub-filters) and three taps per mask (the block diagram draws three lines
// from each mask into the adder). The default coefficient sets are simple
// symmetric (linear-phase) examples and should be replaced by a real design.
package ispa_pkg;

  localparam int unsigned IN_W      = 8;   // input sample, signed
  localparam int unsigned COEF_W    = 8;   // coefficients and alpha, signed Q1.7
  localparam int unsigned FRAC      = 7;   // fraction bits of COEF_W values
  localparam int unsigned W         = 24;  // internal signed word
  localparam int unsigned SUB_TAPS  = 5;   // taps per sub-filter (odd)
  localparam int unsigned MAX_M     = 4;   // largest interpolation factor M
  localparam int unsigned M_W       = $clog2(MAX_M + 1);
  localparam int unsigned L         = 3;   // sub-filters 1 .. L+1
  localparam int unsigned NSUB      = L + 1;
  localparam int unsigned MASK_TAPS = 3;

  typedef logic signed [IN_W-1:0]   sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [W-1:0]      word_t;

  // Packed coefficient tables, element 0 first (leftmost in a literal).
  typedef coef_t      [0:SUB_TAPS-1]  sub_coefs_t;
  typedef sub_coefs_t [0:NSUB-1]      spa_coefs_t;
  typedef coef_t      [0:MASK_TAPS-1] mask_coefs_t;

  // Sub-filter k+1 uses SUB_COEFS[k]; tap 0 is the leftmost (most delayed).
  localparam spa_coefs_t SUB_COEFS = '{
    '{ 8'sd8,  8'sd32,  8'sd48,  8'sd32,  8'sd8 },
    '{-8'sd8,  8'sd0,   8'sd16,  8'sd0,  -8'sd8 },
    '{ 8'sd4, -8'sd8,   8'sd8,  -8'sd8,   8'sd4 },
    '{-8'sd2,  8'sd4,  -8'sd4,   8'sd4,  -8'sd2 }
  };

  localparam mask_coefs_t MASK1_COEFS = '{ 8'sd32, 8'sd64,  8'sd32 };
  localparam mask_coefs_t MASK2_COEFS = '{-8'sd32, 8'sd64, -8'sd32 };

endpackage
