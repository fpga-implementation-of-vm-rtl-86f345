// Top level: the multiply-accumulate FIR filter and the tunable interpolated
// filter structure, side by side.
//
// The published design describes its filter in two ways that do not connect
// to each other: as a sequential eight-tap multiply-accumulate datapath
// (control circuit, address generator, sample RAM, coefficient ROM, Vedic
// multiplier, carry skip accumulator), which is the part its results come
// from, and as a structure of interpolated sub-filters, a tuning multiplier
// chain, a complementary branch and masking filters. Both are built here and
// share only the clock and reset; each keeps its own ports, prefixed mac_ and
// frm_. See mac_fir_filter and ispa_frm_filter for their interfaces and
// timing. The sample source (a random number generator in the published
// set-up) is outside: it writes the MAC filter's RAM through mac_ram_*.
module ispa_top (
  input  logic                     clk,
  input  logic                     rst_n,
  // multiply-accumulate FIR filter
  input  logic                     mac_start,
  input  logic                     mac_ram_we,
  input  fir_pkg::addr_t           mac_ram_waddr,
  input  fir_pkg::sample_t         mac_ram_wdata,
  output fir_pkg::acc_t            mac_acc_out,
  output logic                     mac_busy,
  output logic                     mac_done,
  output fir_pkg::addr_t           mac_tap_addr,
  output fir_pkg::sample_t         mac_sample,
  output fir_pkg::coef_t           mac_coef,
  output fir_pkg::prod_t           mac_product,
  // tunable interpolated filter structure
  input  logic                     frm_en,
  input  ispa_pkg::sample_t        frm_x,
  input  logic [ispa_pkg::M_W-1:0] frm_sel_m,
  input  logic                     frm_sel_sub,
  input  ispa_pkg::coef_t          frm_alpha,
  output ispa_pkg::word_t          frm_h_a,
  output ispa_pkg::word_t          frm_h_c,
  output ispa_pkg::word_t          frm_y
);
  mac_fir_filter u_mac (
    .clk, .rst_n,
    .start    (mac_start),
    .ram_we   (mac_ram_we),
    .ram_waddr(mac_ram_waddr),
    .ram_wdata(mac_ram_wdata),
    .acc_out  (mac_acc_out),
    .busy     (mac_busy),
    .done     (mac_done),
    .tap_addr (mac_tap_addr),
    .sample   (mac_sample),
    .coef     (mac_coef),
    .product  (mac_product)
  );

  ispa_frm_filter u_frm (
    .clk, .rst_n,
    .en     (frm_en),
    .x      (frm_x),
    .sel_m  (frm_sel_m),
    .sel_sub(frm_sel_sub),
    .alpha  (frm_alpha),
    .h_a    (frm_h_a),
    .h_c    (frm_h_c),
    .y      (frm_y)
  );
endmodule
