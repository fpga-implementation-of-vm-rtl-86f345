// Self-checking testbench of vedic_4x4: all 256 operand pairs are applied and
// the product is compared with the integer product a*b.
module tb_vedic_4x4;
  logic       clk = 1'b0;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        @(posedge clk);
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
