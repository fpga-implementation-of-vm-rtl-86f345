// Self-checking testbench of accumulator: random products are accumulated
// with en toggling at random and clear applied now and then; after each clock
// the register is compared with a reference sum kept in the testbench
// (modulo 2^16). The published first two steps (0 + 216 = 216,
// 216 + 1032 = 1248) are checked by name first.
module tb_accumulator;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clear, en;
  logic [15:0] y, acc;
  logic [15:0] model;
  int checks = 0, failures = 0;

  accumulator #(.WIDTH(16)) dut (.clk, .rst_n, .clear, .en, .y, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic e, input logic [15:0] v);
    clear = c; en = e; y = v;
    @(posedge clk);
    if (c)      model = '0;
    else if (e) model = model + v;
    #1;
    checks++;
    if (acc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d expected %0d", acc, model);
    end
  endtask

  initial begin
    clear = 1'b0; en = 1'b0; y = '0; model = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (acc !== 16'd0) failures++;         // reset value
    rst_n = 1'b1;
    step(1'b1, 1'b0, 16'd0);
    step(1'b0, 1'b1, 16'd216);
    checks++; if (acc !== 16'd216) failures++;
    step(1'b0, 1'b1, 16'd1032);
    checks++; if (acc !== 16'd1248) failures++;
    for (int n = 0; n < 10000; n++)
      step(($urandom % 50) == 0, 1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
