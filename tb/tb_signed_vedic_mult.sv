// Self-checking testbench of signed_vedic_mult: all 65536 pairs of signed
// 8-bit operands are multiplied and compared with the integer product.
module tb_signed_vedic_mult;
  logic               clk = 1'b0;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  signed_vedic_mult dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j);
        @(posedge clk);
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
