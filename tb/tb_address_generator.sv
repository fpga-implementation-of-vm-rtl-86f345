// Self-checking testbench of address_generator: with en and clear driven at
// random the address is compared each clock with a reference counter
// (modulo 8), and last with (address == 7). Wrap-around from 7 to 0 must
// happen at least once.
module tb_address_generator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear, en, last;
  logic [2:0] addr;
  int model = 0;
  int checks = 0, failures = 0, wraps = 0;

  address_generator #(.TAPS(8)) dut (.clk, .rst_n, .clear, .en, .addr, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; en = 1'b0;
    @(negedge clk);
    checks++; if (addr !== 3'd0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clear = (($urandom % 40) == 0);
      en    = (($urandom % 4) != 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) begin
        if (model == 7) wraps++;
        model = (model + 1) % 8;
      end
      #1;
      checks++;
      if (addr !== 3'(model) || last !== (model == 7)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d last=%b expected %0d", addr, last, model);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
