// sample_ram - 64 x 12-bit sample memory.
//
// The source design keeps the ADC samples in a 64-word, 12-bit RAM inside the
// FPGA while they are processed. Here it is one write port and one read port,
// both synchronous to clk: `rdata` shows the word at `raddr` one clock after the
// address is presented (block-RAM style). A write and a read of the same address
// in the same clock return the old word. Contents are not reset.
module sample_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 12,
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
    rdata <= mem[raddr];
  end
endmodule
