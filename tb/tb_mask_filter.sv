// Self-checking testbench of mask_filter with the mask 1 coefficients: random
// 24-bit inputs, some beyond the 8-bit range after scaling so that saturation
// occurs, are fed with en high most of the time; before each clock with en
// every tap product is compared with the reference (scaled, saturated input
// history times coefficient). Saturation must occur at least once.
module tb_mask_filter;
  import ispa_pkg::*;
  import ispa_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  en;
  word_t din;
  word_t taps [MASK_TAPS];
  int    mh[$];
  int checks = 0, failures = 0, saturations = 0;

  mask_filter dut (.clk, .rst_n, .en, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; din = '0;
    for (int i = 0; i < MASK_TAPS; i++) mh.push_front(0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int v;
      @(negedge clk);
      v   = (n % 10 == 0) ? int'($urandom % 2000000) - 1000000 : int'($urandom % 40000) - 20000;
      din = word_t'(v);
      en  = (($urandom % 4) != 0);
      #1;
      if (en) begin
        mh.push_front(sat8(longint'(din)));
        if ((longint'(din) >>> FRAC) > 127 || (longint'(din) >>> FRAC) < -128) saturations++;
        for (int k = 0; k < MASK_TAPS; k++) begin
          checks++;
          if (longint'(taps[k]) != longint'($signed(MASK1_COEFS[k])) * mh[k]) begin
            failures++;
            if (failures < 10) $display("FAIL tap %0d = %0d", k, taps[k]);
          end
        end
      end
    end
    checks++;
    if (saturations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
