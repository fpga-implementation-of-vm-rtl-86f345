// Self-checking testbench of coeff_rom: reads all eight addresses and
// compares with the published coefficient table 6, 8, 10, 13, 18, 23, 34, 47,
// and checks that the COEFS parameter replaces the contents.
module tb_coeff_rom;
  logic       clk = 1'b0;
  logic [2:0] addr;
  logic [7:0] coef, coef_alt;
  int checks = 0, failures = 0;
  int expected [8] = '{6, 8, 10, 13, 18, 23, 34, 47};

  coeff_rom dut (.addr, .coef);
  coeff_rom #(.COEFS('{8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7, 8'd255}))
    dut_alt (.addr, .coef(coef_alt));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      addr = 3'(k);
      @(posedge clk);
      checks++;
      if (coef !== 8'(expected[k])) begin
        failures++;
        $display("FAIL addr %0d: %0d, expected %0d", k, coef, expected[k]);
      end
      checks++;
      if (coef_alt !== ((k == 7) ? 8'd255 : 8'(k + 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
