// End-to-end testbench of mac_fir_filter at its default parameters.
//
// Run 1 loads the eight samples of the published simulation
// (36, 129, 9, 99, 13, 141, 101, 18) and checks, tap by tap, the address, the
// sample, the coefficient, the product and the running sum against values
// computed here from the published coefficient table; the sum must end at
// 10382, the published filter output. Further runs load random samples,
// including all-255 samples (the largest possible sum), rewrite the RAM
// between runs, start back to back and pulse start while busy. Each run
// checks that done comes TAPS + 1 clocks after the clock that takes start.
// Mechanisms counted, each of which must occur: finished runs, starts ignored
// while busy, RAM rewrites between runs and accumulator additions that take
// the carry skip path (some 4-bit block of acc and product propagates fully).
module tb_mac_fir_filter;
  import fir_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    start, ram_we, busy, done;
  addr_t   ram_waddr, tap_addr;
  sample_t ram_wdata, sample;
  coef_t   coef;
  prod_t   product;
  acc_t    acc_out;

  mac_fir_filter dut (
    .clk, .rst_n, .start, .ram_we, .ram_waddr, .ram_wdata,
    .acc_out, .busy, .done, .tap_addr, .sample, .coef, .product
  );

  int checks = 0, failures = 0;
  int runs_done = 0, starts_ignored = 0, ram_rewrites = 0, skip_adds = 0;
  int h [TAPS] = '{6, 8, 10, 13, 18, 23, 34, 47};
  int x [TAPS];
  int fig_x [TAPS] = '{36, 129, 9, 99, 13, 141, 101, 18};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d at %0t", what, got, want, $time);
    end
  endtask

  task automatic load_ram();
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_waddr = addr_t'(k); ram_wdata = sample_t'(x[k]);
    end
    @(negedge clk);
    ram_we = 1'b0;
  endtask

  // One filter output; poke_start pulses start during the run.
  task automatic run(input bit poke_start, output int result);
    int sum = 0;
    int cycles = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      if (poke_start && k == 3) begin
        start = 1'b1;
        starts_ignored++;
      end else start = 1'b0;
      expect_int(busy, 1, "busy");
      expect_int(done, 0, "early done");
      expect_int(tap_addr, k, "tap address");
      expect_int(sample, x[k], "sample");
      expect_int(coef, h[k], "coefficient");
      expect_int(product, x[k] * h[k], "product");
      for (int n = 0; n < ACC_W / 4; n++)
        if (((acc_out ^ product[ACC_W-1:0]) >> (4 * n) & 16'hF) == 16'hF) begin
          skip_adds++;
          break;
        end
      sum += x[k] * h[k];
      @(negedge clk);
      cycles++;
      expect_int(acc_out, sum % 65536, "running sum");
    end
    start = 1'b0;
    // done is high now, TAPS + 1 clocks after the clock that took start.
    expect_int(done, 1, "done");
    expect_int(cycles + 1, TAPS + 1, "latency");
    result = acc_out;
    runs_done++;
    @(negedge clk);
    expect_int(done, 0, "done one clock");
    expect_int(busy, 0, "idle after run");
    expect_int(acc_out, result, "result held");
  endtask

  initial begin
    int result, ref_sum;
    start = 1'b0; ram_we = 1'b0; ram_waddr = '0; ram_wdata = '0;
    repeat (2) @(negedge clk);
    expect_int(acc_out, 0, "reset value");
    rst_n = 1'b1;

    // Run 1: the published example.
    x = fig_x;
    load_ram();
    run(1'b0, result);
    expect_int(result, 10382, "published filter output");

    // Random runs, RAM rewritten in between, some back to back.
    for (int r = 0; r < 40; r++) begin
      if (r % 5 != 4) begin
        for (int k = 0; k < TAPS; k++)
          x[k] = (r == 7) ? 255 : int'($urandom % 256);
        load_ram();
        ram_rewrites++;
      end
      ref_sum = 0;
      for (int k = 0; k < TAPS; k++) ref_sum += x[k] * h[k];
      run(r % 3 == 1, result);
      expect_int(result, ref_sum, "filter output");
    end

    $display("runs=%0d starts_ignored=%0d ram_rewrites=%0d skip_adds=%0d",
             runs_done, starts_ignored, ram_rewrites, skip_adds);
    expect_int(runs_done > 0, 1, "runs happened");
    expect_int(starts_ignored > 0, 1, "start while busy happened");
    expect_int(ram_rewrites > 0, 1, "RAM rewrite happened");
    expect_int(skip_adds > 0, 1, "carry skip path used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
