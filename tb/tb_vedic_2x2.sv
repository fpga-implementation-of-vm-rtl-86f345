// Self-checking testbench of vedic_2x2: all 16 operand pairs are applied and
// the product is compared with the integer product a*b.
module tb_vedic_2x2;
  logic       clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    // The worked example: 11 x 11 = 1001.
    a = 2'b11; b = 2'b11;
    @(posedge clk);
    checks++;
    if (p !== 4'b1001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
