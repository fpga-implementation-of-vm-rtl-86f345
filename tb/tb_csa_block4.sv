// Self-checking testbench of csa_block4: all 512 combinations of the two
// 4-bit operands and the carry in are applied; sum and carry out are compared
// with a + b + c0. It also counts the cases where all four propagate bits
// are 1, where the carry out comes through the skip multiplexer, and fails if
// there were none.
module tb_csa_block4;
  logic       clk = 1'b0;
  logic [3:0] a, b, s;
  logic       c0, cout;
  int checks = 0, failures = 0, skips = 0;

  csa_block4 dut (.a, .b, .c0, .s, .cout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); c0 = 1'(c);
          @(posedge clk);
          checks++;
          if ((i ^ j) == 15) skips++;
          if ({cout, s} !== 5'(i + j + c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d = %0d, expected %0d", i, j, c, {cout, s}, i + j + c);
          end
        end
    checks++;
    if (skips == 0) failures++;
    $display("skip-path cases: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
