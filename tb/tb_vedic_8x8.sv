// Self-checking testbench of vedic_8x8, the filter's processing element: all
// 65536 operand pairs are applied and the 16-bit product is compared with the
// integer product a*b. The two products of the published simulation
// (36 * 6 = 216 and 129 * 8 = 1032) are checked by name as well.
module tb_vedic_8x8;
  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int x, input int y, input int expected);
    a = 8'(x); b = 8'(y);
    @(posedge clk);
    checks++;
    if (p !== 16'(expected)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d = %0d, expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    check(36, 6, 216);
    check(129, 8, 1032);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(i, j, i * j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
