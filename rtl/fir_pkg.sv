// Shared sizes and constants of the 8-tap multiply-accumulate FIR filter.
//
// The filter reads eight 8-bit samples from a small RAM and eight 8-bit
// coefficients from a ROM, multiplies one pair per clock with an 8x8 Vedic
// multiplier and sums the 16-bit products in an accumulator built on a carry
// skip adder. The tap count, the 8-bit sample and coefficient widths, the
// 16-bit product and accumulator and the coefficient values
// (6, 8, 10, 13, 18, 23, 34, 47, obtained from equiripple (Parks-McClellan)
// designs as x = round(255 * peak ripple) for stop-band edges 0.15 down to
// 0.115) all follow the published design. The coefficients are unsigned
// integers, so all arithmetic here is unsigned.
package fir_pkg;

  localparam int unsigned TAPS   = 8;   // taps per filter output
  localparam int unsigned DATA_W = 8;   // input sample width
  localparam int unsigned COEF_W = 8;   // coefficient width
  localparam int unsigned PROD_W = DATA_W + COEF_W;  // 16-bit product
  localparam int unsigned ACC_W  = 16;  // accumulator width
  localparam int unsigned ADDR_W = $clog2(TAPS);

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [ACC_W-1:0]  acc_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef coef_t coef_table_t [TAPS];

  // Coefficient table, address 0 first.
  localparam coef_table_t COEFS = '{8'd6, 8'd8, 8'd10, 8'd13,
                                    8'd18, 8'd23, 8'd34, 8'd47};

endpackage
