// Self-checking testbench of control_circuit. A tap counter in the testbench
// plays the address generator (cleared by clear, advanced by mac_en, last at
// tap 7). For each run it checks: clear for exactly the clock that takes
// start, mac_en for exactly 8 clocks, done one clock after the last tap and
// for one clock only, busy throughout, and start ignored while busy.
module tb_control_circuit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, last, clear, mac_en, busy, done;
  int   tap = 0;
  int checks = 0, failures = 0, ignored_starts = 0;

  control_circuit dut (.clk, .rst_n, .start, .last, .clear, .mac_en, .busy, .done);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (clear) tap <= 0;
    else if (mac_en) tap <= (tap + 1) % 8;
  assign last = (tap == 7);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %b, expected %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    start = 1'b0;
    @(negedge clk);
    expect_eq(busy, 1'b0, "busy in reset");
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      automatic int idle = $urandom % 4;
      repeat (idle) begin
        @(negedge clk);
        expect_eq(busy, 1'b0, "busy idle");
        expect_eq(done, 1'b0, "done idle");
      end
      start = 1'b1;
      #1;
      expect_eq(clear, 1'b1, "clear with start");
      expect_eq(mac_en, 1'b0, "mac_en with start");
      @(negedge clk);
      // Keep start high or toggle it during the run: it must be ignored.
      for (int c = 0; c < 8; c++) begin
        start = 1'($urandom);
        if (start) ignored_starts++;
        #1;
        expect_eq(mac_en, 1'b1, "mac_en during run");
        expect_eq(clear, 1'b0, "clear during run");
        expect_eq(busy, 1'b1, "busy during run");
        expect_eq(done, 1'b0, "done during run");
        @(negedge clk);
      end
      start = 1'b0;
      #1;
      expect_eq(done, 1'b1, "done after 8 taps");
      expect_eq(mac_en, 1'b0, "mac_en after 8 taps");
      @(negedge clk);
      expect_eq(done, 1'b0, "done one clock only");
      expect_eq(busy, 1'b0, "back to idle");
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
