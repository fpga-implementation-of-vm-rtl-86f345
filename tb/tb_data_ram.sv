// Self-checking testbench of data_ram: fills all eight words with random
// bytes, reads every address back (the read is combinational), then rewrites
// single words and checks that only the written word changed.
module tb_data_ram;
  logic       clk = 1'b0;
  logic       we;
  logic [2:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(8), .WIDTH(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < 8; k++) begin
      raddr = 3'(k);
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("FAIL addr %0d: %0d, expected %0d", k, rdata, model[k]);
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      we = 1'b1; waddr = 3'(k); wdata = 8'($urandom); model[k] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    check_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
