// Self-checking testbench of complementary_delay: random samples are fed
// (en high most of the time) while M changes every few samples; before each
// clock with en, xd must equal the sample taken (SUB_TAPS-1)/2 * M samples
// earlier, scaled by 2^FRAC. Every M from 1 to 4 must be checked.
module tb_complementary_delay;
  import ispa_pkg::*;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           en;
  sample_t        x;
  logic [M_W-1:0] sel_m;
  word_t          xd;
  int             xh[$];
  int checks = 0, failures = 0;
  int m_used [MAX_M + 1];

  complementary_delay dut (.clk, .rst_n, .en, .x, .sel_m, .xd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; x = '0; sel_m = M_W'(1);
    for (int i = 0; i <= MAX_M; i++) m_used[i] = 0;
    for (int i = 0; i < 16; i++) xh.push_front(0);   // reset contents
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int m;
      @(negedge clk);
      if (n % 7 == 0) sel_m = M_W'(1 + $urandom % MAX_M);
      m  = int'(sel_m);
      x  = sample_t'($urandom);
      en = (($urandom % 4) != 0);
      #1;
      if (en) begin
        automatic int d = (SUB_TAPS - 1) / 2 * m;
        checks++;
        m_used[m]++;
        // xh[0] is the previous sample; delay d means xh[d-1].
        if (longint'(xd) != longint'(xh[d-1]) * (1 << FRAC)) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d xd=%0d expected %0d", m, xd, xh[d-1] * 128);
        end
        xh.push_front(int'(x));
      end
    end
    for (int i = 1; i <= MAX_M; i++) begin
      checks++;
      if (m_used[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
