// Self-checking testbench of csa_adder at two widths: 16 bits (whole 4-bit
// blocks) and 6 bits (a padded last block). Edge operands and random ones are
// added and {cout, sum} is compared with the integer sum. Operands whose
// blocks all propagate (a ^ b all ones) exercise the carry skipping through
// every block.
module tb_csa_adder;
  logic        clk = 1'b0;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [5:0]  a6, b6, s6;
  logic        ci6, co6;
  int checks = 0, failures = 0;

  csa_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csa_adder #(.WIDTH(6))  dut6  (.a(a6),  .b(b6),  .cin(ci6),  .sum(s6),  .cout(co6));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] expected;
    a16 = x; b16 = y; ci16 = c;
    expected = 17'(x) + 17'(y) + 17'(c);
    @(posedge clk);
    checks++;
    if ({co16, s16} !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h + %h + %b = %h, expected %h", x, y, c, {co16, s16}, expected);
    end
  endtask

  initial begin
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);   // full skip chain, carry out
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0F0F, 16'h00F1, 1'b0);
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] x, y;
      x = 16'($urandom);
      y = (n % 4 == 0) ? ~x : 16'($urandom);  // all-propagate half the time
      check16(x, y, 1'($urandom));
    end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int c = 0; c < 2; c++) begin
          a6 = 6'(i); b6 = 6'(j); ci6 = 1'(c);
          @(posedge clk);
          checks++;
          if ({co6, s6} !== 7'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL6 %0d + %0d + %0d = %0d", i, j, c, {co6, s6});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
