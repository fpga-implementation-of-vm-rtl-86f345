// Self-checking testbench of ispa_frm_filter at its default sizes and
// coefficients. Random 8-bit samples are fed (en high most of the time) in
// segments, each with its own M (1..4), add/subtract select and alpha
// (negative, zero and positive). Before each clock that takes a sample, H_A
// and H_C are compared with the reference model, and after it the registered
// output y with the sum of both masks' tap products. Checks in a segment
// start once every stored value was produced under its settings. Counted and
// required: each M, both selects, negative and positive alpha, stalls
// (en low) and mask-input saturation.
module tb_ispa_frm_filter;
  import ispa_pkg::*;
  import ispa_ref_pkg::*;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           en, sel_sub;
  sample_t        x;
  logic [M_W-1:0] sel_m;
  coef_t          alpha;
  word_t          h_a_o, h_c_o, y;
  int             xh[$], m1h[$], m2h[$];
  int checks = 0, failures = 0;
  int stalls = 0, sub_segs = 0, neg_alpha = 0, pos_alpha = 0, saturations = 0;
  int m_used [MAX_M + 1];

  ispa_frm_filter dut (.clk, .rst_n, .en, .x, .sel_m, .sel_sub, .alpha,
                       .h_a(h_a_o), .h_c(h_c_o), .y);

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
      if (failures < 10) $display("FAIL %s = %0d, expected %0d at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    en = 1'b0; sel_sub = 1'b0; x = '0; sel_m = M_W'(1); alpha = '0;
    for (int i = 0; i <= MAX_M; i++) m_used[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 32; seg++) begin
      automatic int m     = 1 + seg % MAX_M;
      automatic int a     = (seg % 3 == 0) ? 0 : int'($urandom % 256) - 128;
      automatic int taken = 0;
      sel_m   = M_W'(m);
      sel_sub = 1'((seg / MAX_M) % 2);
      alpha   = coef_t'(a);
      if (sel_sub) sub_segs++;
      if (a < 0) neg_alpha++;
      if (a > 0) pos_alpha++;
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        // Every fourth segment drives full-scale alternating samples, which
        // pushes H_C past the masks' 8-bit input range.
        x  = (seg % 4 == 3) ? ((n % 2 == 0) ? -8'sd128 : 8'sd127) : sample_t'($urandom);
        en = (($urandom % 5) != 0);
        if (!en) stalls++;
        #1;
        if (en) begin
          automatic longint ea, ec, ey;
          xh.push_front(int'(x));
          taken++;
          ea = h_a(xh, m, sel_sub, a);
          ec = h_c(xh, m, sel_sub, a);
          if ((ea >>> FRAC) > 127 || (ea >>> FRAC) < -128 ||
              (ec >>> FRAC) > 127 || (ec >>> FRAC) < -128) saturations++;
          m1h.push_front(sat8(ec));
          m2h.push_front(sat8(ea));
          ey = wrap(mask_sum(m1h, MASK1_COEFS) + mask_sum(m2h, MASK2_COEFS));
          if (taken > (SUB_TAPS - 1) * MAX_M + MASK_TAPS) begin
            expect_eq(longint'(h_a_o), ea, "H_A");
            expect_eq(longint'(h_c_o), ec, "H_C");
            m_used[m]++;
          end
          @(posedge clk);
          #1;
          if (taken > (SUB_TAPS - 1) * MAX_M + MASK_TAPS)
            expect_eq(longint'(y), ey, "y");
        end
      end
    end
    $display("stalls=%0d sub_segments=%0d neg_alpha=%0d pos_alpha=%0d saturations=%0d",
             stalls, sub_segs, neg_alpha, pos_alpha, saturations);
    for (int i = 1; i <= MAX_M; i++) expect_eq(m_used[i] > 0, 1, "M used");
    expect_eq(stalls > 0, 1, "stalls");
    expect_eq(sub_segs > 0, 1, "subtract select");
    expect_eq(neg_alpha > 0, 1, "negative alpha");
    expect_eq(pos_alpha > 0, 1, "positive alpha");
    expect_eq(saturations > 0, 1, "mask saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
