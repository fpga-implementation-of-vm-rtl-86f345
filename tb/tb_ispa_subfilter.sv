// Self-checking testbench of ispa_subfilter with the default coefficients of
// sub-filter 1. Random samples are fed with en high most of the time; the
// interpolation factor M (1..4) and the add/subtract select change between
// segments. Before each clock that takes a sample, y is compared with the
// direct-form reference; checks start once the delay lines hold only samples
// taken under the current settings. Every M, both selects and en-low stalls
// must occur.
module tb_ispa_subfilter;
  import ispa_pkg::*;
  import ispa_ref_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          en, sel_sub;
  sample_t       x;
  logic [M_W-1:0] sel_m;
  word_t         y;
  int            xh[$];
  int checks = 0, failures = 0, stalls = 0, sub_segments = 0;
  int m_used [MAX_M + 1];

  ispa_subfilter dut (.clk, .rst_n, .en, .x, .sel_m, .sel_sub, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; sel_sub = 1'b0; x = '0; sel_m = M_W'(1);
    for (int i = 0; i <= MAX_M; i++) m_used[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 24; seg++) begin
      automatic int m = 1 + seg % MAX_M;
      automatic int taken = 0;
      sel_m = M_W'(m);
      sel_sub = 1'((seg / MAX_M) % 2);
      if (sel_sub) sub_segments++;
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        x  = sample_t'($urandom);
        en = (($urandom % 5) != 0);
        if (!en) stalls++;
        #1;
        if (en) begin
          xh.push_front(int'(x));
          taken++;
          if (taken > (SUB_TAPS - 1) * MAX_M) begin
            checks++;
            m_used[m]++;
            if (longint'(y) != sub_out(xh, m, sel_sub, SUB_COEFS[0])) begin
              failures++;
              if (failures < 10)
                $display("FAIL M=%0d sub=%b y=%0d expected %0d", m, sel_sub, y,
                         sub_out(xh, m, sel_sub, SUB_COEFS[0]));
            end
          end
        end
      end
    end
    for (int i = 1; i <= MAX_M; i++) begin
      checks++;
      if (m_used[i] == 0) failures++;
    end
    checks++; if (stalls == 0) failures++;
    checks++; if (sub_segments == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
