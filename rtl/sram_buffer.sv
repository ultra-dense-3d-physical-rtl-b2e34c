// sram_buffer: local SRAM buffer of a compute sub-system.
//
// A simple dual-port memory: one synchronous write port and one synchronous
// read port with one cycle of read latency (rdata is valid the cycle after re
// and holds until the next read). A read and a write to the same address in the
// same cycle return the old contents. Contents are not reset. Each compute
// sub-system uses two of these: the input buffer (2048 x 128 bits) and the
// output buffer (512 x 512 bits), 32 KB each. Sizes and port arrangement are
// this implementation's choice.
module sram_buffer #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 2048,
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
