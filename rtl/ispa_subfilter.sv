// Interpolated sub-filter with selectable delay M and add/subtract taps.
//
// A transposed-form FIR whose delay elements are z^-M instead of z^-1. Every
// tap multiplies the current input by its coefficient h[k]. Starting from the
// leftmost tap, each partial sum passes a z^-M delay and is combined with the
// next tap's product; the combining adders of odd taps (1, 3, ...) add or
// subtract the product according to sel_sub, those of even taps always add.
// So y(n) = sum over k of s_k * h[k] * x(n - (NTAPS-1-k)*M) with s_k = -1 for
// odd k when sel_sub is set and +1 otherwise; subtracting on alternate taps
// mirrors the response about a quarter of the sampling rate.
//
// The chain of h multipliers, z^-M delays, +/- and + adders, and the select M
// and select add/sub controls follow the published sub-filter diagram. The
// number of taps, the largest M, the coefficient values and which adder
// input is subtracted are this design's choices. Each z^-M is a MAX_M-stage
// register line read at stage M (sel_m of 0 is taken as 1). The products come
// from the Vedic multiplier and the combining adders are carry skip adders
// (subtraction as a + ~b + 1).
//
// Timing: registers move on clocks with en high (one input sample per such
// clock); y is combinational from x and the registers, so the tap with no
// delay reaches y in the same cycle. rst_n clears all delay registers.
module ispa_subfilter #(
  parameter int unsigned    NTAPS = ispa_pkg::SUB_TAPS,
  parameter int unsigned    MAX_M = ispa_pkg::MAX_M,
  parameter ispa_pkg::coef_t [0:NTAPS-1] H = ispa_pkg::SUB_COEFS[0],
  localparam int unsigned   W     = ispa_pkg::W,
  localparam int unsigned   MW    = $clog2(MAX_M + 1),
  localparam int unsigned   IW    = $clog2(MAX_M)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  ispa_pkg::sample_t      x,
  input  logic [MW-1:0]          sel_m,
  input  logic                   sel_sub,
  output ispa_pkg::word_t        y
);
  import ispa_pkg::*;

  logic signed [15:0] prod  [NTAPS];
  word_t              psum  [NTAPS];       // partial sum after tap k
  word_t              dline [NTAPS-1][MAX_M];
  word_t              dout  [NTAPS-1];     // delayed partial sum into tap k+1
  logic [MW-1:0]      m_eff;

  assign m_eff = (sel_m == '0) ? MW'(1) : (sel_m > MW'(MAX_M) ? MW'(MAX_M) : sel_m);

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    signed_vedic_mult u_mul (.a(x), .b(H[k]), .p(prod[k]));
  end

  assign psum[0] = W'(prod[0]);

  for (genvar k = 1; k < NTAPS; k++) begin : g_chain
    logic  sub;
    word_t operand;
    logic  co;
    assign sub     = (k % 2 == 1) && sel_sub;
    assign operand = sub ? ~W'(prod[k]) : W'(prod[k]);
    csa_adder #(.WIDTH(W)) u_add (
      .a(dout[k-1]), .b(operand), .cin(sub), .sum(psum[k]), .cout(co));
  end

  for (genvar k = 0; k < NTAPS - 1; k++) begin : g_delay
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < MAX_M; i++) dline[k][i] <= '0;
      end else if (en) begin
        dline[k][0] <= psum[k];
        for (int i = 1; i < MAX_M; i++) dline[k][i] <= dline[k][i-1];
      end
    end
    assign dout[k] = dline[k][IW'(m_eff - 1'b1)];
  end

  assign y = psum[NTAPS-1];
endmodule
