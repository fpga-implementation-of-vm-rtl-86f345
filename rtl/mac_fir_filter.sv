// Eight-tap multiply-accumulate FIR filter with a Vedic multiplier and a
// carry skip accumulator.
//
// One filter output is the sum over the taps k = 0..TAPS-1 of x[k] * h[k],
// where x[k] is the sample at RAM address k and h[k] the coefficient at ROM
// address k. A single processing element does all the multiplications: on
// each clock the address generator names one tap, the RAM and ROM return its
// sample and coefficient, the 8x8 Vedic multiplier forms the 16-bit product y
// and the accumulator adds y to its register through a carry skip adder. After
// TAPS clocks the accumulator holds the output.
//
// Interface:
//   start          pulse (in IDLE) to compute one output from the RAM contents
//   ram_we/...     write port of the sample RAM; the sample source (a random
//                  number generator in the published set-up) is outside
//   busy, done     busy while computing; done pulses for one clock when
//                  acc_out holds the finished sum, which then stays until the
//                  next start
//   tap_addr, sample, coef, product
//                  the current tap, for observation
// Timing: start is taken on clock 0, taps 0..7 are accumulated on clocks
// 1..8, done is high in the cycle after clock 8 (TAPS + 1 clocks after start).
//
// The block structure (control circuit, address generator, RAM, ROM, PE using
// the Vedic multiplier, accumulator with the carry skip adder) and all widths
// and coefficients follow the published design. The start/done handshake and
// the external RAM write port are this design's.
module mac_fir_filter #(
  parameter fir_pkg::coef_table_t COEFS = fir_pkg::COEFS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            ram_we,
  input  fir_pkg::addr_t  ram_waddr,
  input  fir_pkg::sample_t ram_wdata,
  output fir_pkg::acc_t   acc_out,
  output logic            busy,
  output logic            done,
  output fir_pkg::addr_t  tap_addr,
  output fir_pkg::sample_t sample,
  output fir_pkg::coef_t  coef,
  output fir_pkg::prod_t  product
);
  import fir_pkg::*;

  logic clear, mac_en, last;

  control_circuit u_ctrl (
    .clk, .rst_n, .start, .last,
    .clear, .mac_en, .busy, .done
  );

  address_generator #(.TAPS(TAPS)) u_agen (
    .clk, .rst_n, .clear, .en(mac_en),
    .addr(tap_addr), .last
  );

  data_ram #(.DEPTH(TAPS), .WIDTH(DATA_W)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(tap_addr), .rdata(sample)
  );

  coeff_rom #(.COEFS(COEFS)) u_rom (
    .addr(tap_addr), .coef
  );

  vedic_8x8 u_pe (
    .a(sample), .b(coef), .p(product)
  );

  accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk, .rst_n, .clear, .en(mac_en),
    .y(ACC_W'(product)), .acc(acc_out)
  );

  // The accumulator is exactly as wide as a product, so no product bit is lost.
  if (ACC_W < PROD_W) begin : g_width_check
    $error("accumulator narrower than the product");
  end

  // done only follows a run, and a run accumulates exactly TAPS taps.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    (mac_en && last) |=> done);
  a_no_clear_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    clear |-> !busy);
endmodule
