// Input sample RAM of the FIR filter: DEPTH words of WIDTH bits.
//
// Samples are written one per clock through the write port (we, waddr, wdata)
// and read without a clock: rdata follows raddr in the same cycle, so the
// multiplier sees the sample of the current tap address within one clock, as
// the published timing needs (first sample and first coefficient are
// multiplied in the first clock). Holding the samples in a RAM addressed by
// the tap address generator follows the published design; the single write
// port, through which an external sample source fills it, and the
// asynchronous read are this design's choices. The array is not reset.
module data_ram #(
  parameter int unsigned DEPTH = fir_pkg::TAPS,
  parameter int unsigned WIDTH = fir_pkg::DATA_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
