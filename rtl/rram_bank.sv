// rram_bank: behavioural model of one bank of on-chip RRAM weight memory.
//
// The real part is a 1T1R resistive-RAM cell array (access transistors in the
// CNFET tier above the RRAM, or in silicon for a planar design) with sense
// amplifiers and write drivers in the silicon tier. This model keeps only its
// logical behaviour: BYTES of storage behind a WIDTH-bit port. A request with
// we=0 reads the word at addr and returns it with rvalid one cycle later; a
// request with we=1 programs the word in that cycle. Programming pulses,
// verify loops, multi-level cells and endurance are not modelled, and the
// one-cycle access time is an assumption. The 64 MB of RRAM is split into
// eight such 8 MB banks, one per compute sub-system, each with a 128-bit port.
module rram_bank #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned BYTES = 8*1024*1024,
  localparam int unsigned WORDS = BYTES*8/WIDTH,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] cells [WORDS];

  always_ff @(posedge clk) begin
    if (req && we) cells[addr] <= wdata;
    if (req && !we) rdata <= cells[addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= req && !we;
  end

endmodule
