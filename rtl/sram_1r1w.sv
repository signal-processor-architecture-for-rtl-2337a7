// sram_1r1w: synchronous memory with one write port and one registered read
// port.  Every memory of the Functional Module (Data Input Buffers, operand
// memories, output memories) is built from it; the depth defaults to the
// 2k words used throughout the machine.  A write and a read of the same
// address in the same cycle return the old word (read-before-write).
// Timing: rdata holds mem[raddr] from the clock edge where re is high until
// the next such edge.  Contents are not reset.
module sram_1r1w #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
