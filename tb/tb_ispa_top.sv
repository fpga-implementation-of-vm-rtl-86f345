// End-to-end testbench of ispa_top at its default parameters: both filters
// run at the same time.
//
// Multiply-accumulate filter: the published example (samples 36, 129, 9, 99,
// 13, 141, 101, 18 with coefficients 6, 8, 10, 13, 18, 23, 34, 47, output
// 10382) is checked tap by tap, then random sample sets, back-to-back runs,
// start pulses while busy and RAM rewrites follow; each result is compared
// with the dot product computed here, and done must come TAPS + 1 clocks
// after start. Interpolated filter structure: random samples in segments of
// different M, add/subtract select and alpha, with stalls; H_A, H_C and y
// are compared with the reference model. Each mechanism is counted and must
// occur: finished runs, ignored starts, RAM rewrites, carry-skip additions in
// the accumulator, every M, both selects, both signs of alpha, stalls and
// mask saturation.
module tb_ispa_top;
  import fir_pkg::*;
  import ispa_ref_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;

  // multiply-accumulate filter
  logic    mac_start, mac_ram_we, mac_busy, mac_done;
  addr_t   mac_ram_waddr, mac_tap_addr;
  sample_t mac_ram_wdata, mac_sample;
  coef_t   mac_coef;
  prod_t   mac_product;
  acc_t    mac_acc_out;
  // interpolated filter structure
  logic                     frm_en, frm_sel_sub;
  ispa_pkg::sample_t        frm_x;
  logic [ispa_pkg::M_W-1:0] frm_sel_m;
  ispa_pkg::coef_t          frm_alpha;
  ispa_pkg::word_t          frm_h_a, frm_h_c, frm_y;

  ispa_top dut (.*);

  int checks = 0, failures = 0;
  int runs_done = 0, starts_ignored = 0, ram_rewrites = 0, skip_adds = 0;
  int stalls = 0, sub_segs = 0, neg_alpha = 0, pos_alpha = 0, saturations = 0;
  int m_used [ispa_pkg::MAX_M + 1];
  int h [TAPS] = '{6, 8, 10, 13, 18, 23, 34, 47};
  int x [TAPS];
  int fig_x [TAPS] = '{36, 129, 9, 99, 13, 141, 101, 18};

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d at %0t", what, got, want, $time);
    end
  endtask

  // ---------------- multiply-accumulate filter ----------------
  task automatic load_ram();
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      mac_ram_we = 1'b1; mac_ram_waddr = addr_t'(k); mac_ram_wdata = sample_t'(x[k]);
    end
    @(negedge clk);
    mac_ram_we = 1'b0;
  endtask

  task automatic mac_run(input bit poke_start, output int result);
    int sum = 0;
    mac_start = 1'b1;
    @(negedge clk);
    for (int k = 0; k < TAPS; k++) begin
      mac_start = poke_start && (k == 2);
      if (mac_start) starts_ignored++;
      expect_eq(mac_busy, 1, "busy");
      expect_eq(mac_tap_addr, k, "tap address");
      expect_eq(mac_sample, x[k], "sample");
      expect_eq(mac_coef, h[k], "coefficient");
      expect_eq(mac_product, x[k] * h[k], "product");
      for (int n = 0; n < ACC_W / 4; n++)
        if (((mac_acc_out ^ mac_product[ACC_W-1:0]) >> (4 * n) & 16'hF) == 16'hF) begin
          skip_adds++;
          break;
        end
      sum += x[k] * h[k];
      @(negedge clk);
      expect_eq(mac_acc_out, sum % 65536, "running sum");
      expect_eq(mac_done, (k == TAPS - 1), "done timing");
    end
    mac_start = 1'b0;
    result = mac_acc_out;
    runs_done++;
    @(negedge clk);
    expect_eq(mac_done, 0, "done one clock");
    expect_eq(mac_busy, 0, "idle");
  endtask

  task automatic mac_test();
    int result, ref_sum;
    x = fig_x;
    load_ram();
    mac_run(1'b0, result);
    expect_eq(result, 10382, "published filter output");
    for (int r = 0; r < 30; r++) begin
      if (r % 4 != 3) begin
        for (int k = 0; k < TAPS; k++) x[k] = (r == 5) ? 255 : int'($urandom % 256);
        load_ram();
        ram_rewrites++;
      end
      ref_sum = 0;
      for (int k = 0; k < TAPS; k++) ref_sum += x[k] * h[k];
      mac_run(r % 3 == 1, result);
      expect_eq(result, ref_sum, "filter output");
    end
  endtask

  // ---------------- interpolated filter structure ----------------
  task automatic frm_test();
    int xh[$], m1h[$], m2h[$];
    for (int seg = 0; seg < 24; seg++) begin
      automatic int m     = 1 + seg % ispa_pkg::MAX_M;
      automatic int a     = (seg % 3 == 0) ? 0 : int'($urandom % 256) - 128;
      automatic int taken = 0;
      frm_sel_m   = ispa_pkg::M_W'(m);
      frm_sel_sub = 1'((seg / ispa_pkg::MAX_M) % 2);
      frm_alpha   = ispa_pkg::coef_t'(a);
      if (frm_sel_sub) sub_segs++;
      if (a < 0) neg_alpha++;
      if (a > 0) pos_alpha++;
      for (int n = 0; n < 50; n++) begin
        @(negedge clk);
        frm_x  = (seg % 4 == 3) ? ((n % 2 == 0) ? -8'sd128 : 8'sd127)
                                : ispa_pkg::sample_t'($urandom);
        frm_en = (($urandom % 5) != 0);
        if (!frm_en) stalls++;
        #1;
        if (frm_en) begin
          automatic longint ea, ec, ey;
          xh.push_front(int'(frm_x));
          taken++;
          ea = h_a(xh, m, frm_sel_sub, a);
          ec = h_c(xh, m, frm_sel_sub, a);
          if ((ec >>> ispa_pkg::FRAC) > 127 || (ec >>> ispa_pkg::FRAC) < -128) saturations++;
          m1h.push_front(sat8(ec));
          m2h.push_front(sat8(ea));
          ey = wrap(mask_sum(m1h, ispa_pkg::MASK1_COEFS) + mask_sum(m2h, ispa_pkg::MASK2_COEFS));
          if (taken > (ispa_pkg::SUB_TAPS - 1) * ispa_pkg::MAX_M + ispa_pkg::MASK_TAPS) begin
            expect_eq(longint'(frm_h_a), ea, "H_A");
            expect_eq(longint'(frm_h_c), ec, "H_C");
            m_used[m]++;
          end
          @(posedge clk);
          #1;
          if (taken > (ispa_pkg::SUB_TAPS - 1) * ispa_pkg::MAX_M + ispa_pkg::MASK_TAPS)
            expect_eq(longint'(frm_y), ey, "y");
        end
      end
    end
  endtask

  initial begin
    mac_start = 1'b0; mac_ram_we = 1'b0; mac_ram_waddr = '0; mac_ram_wdata = '0;
    frm_en = 1'b0; frm_sel_sub = 1'b0; frm_x = '0; frm_sel_m = '0; frm_alpha = '0;
    for (int i = 0; i <= ispa_pkg::MAX_M; i++) m_used[i] = 0;
    repeat (2) @(negedge clk);
    expect_eq(mac_acc_out, 0, "reset value");
    expect_eq(frm_y, 0, "reset value");
    rst_n = 1'b1;
    fork
      mac_test();
      frm_test();
    join
    $display("mac: runs=%0d starts_ignored=%0d ram_rewrites=%0d skip_adds=%0d",
             runs_done, starts_ignored, ram_rewrites, skip_adds);
    $display("frm: stalls=%0d sub_segments=%0d neg_alpha=%0d pos_alpha=%0d saturations=%0d",
             stalls, sub_segs, neg_alpha, pos_alpha, saturations);
    expect_eq(runs_done > 0, 1, "runs");
    expect_eq(starts_ignored > 0, 1, "start while busy");
    expect_eq(ram_rewrites > 0, 1, "RAM rewrite");
    expect_eq(skip_adds > 0, 1, "carry skip path");
    for (int i = 1; i <= ispa_pkg::MAX_M; i++) expect_eq(m_used[i] > 0, 1, "M used");
    expect_eq(stalls > 0, 1, "stalls");
    expect_eq(sub_segs > 0, 1, "subtract select");
    expect_eq(neg_alpha > 0, 1, "negative alpha");
    expect_eq(pos_alpha > 0, 1, "positive alpha");
    expect_eq(saturations > 0, 1, "mask saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
