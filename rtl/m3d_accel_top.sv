// m3d_accel_top: the monolithic-3D accelerator with N_CS parallel compute
// sub-systems.
//
// In the planar design the RRAM access transistors fill the silicon under the
// memory array, so only one compute sub-system fits beside it. Moving the
// access transistors into a carbon-nanotube FET layer above the RRAM frees
// that silicon, and the same footprint and the same 64 MB of RRAM then hold
// eight sub-systems. The RRAM is split into eight 8 MB banks so that each
// sub-system has its own 128-bit port (8 x 128 bits in total), and the
// sub-systems run independent tiles in parallel.
//
// Host port: host_addr = {cs index, region (m3d_pkg::region_e), 19-bit word}.
// A request is accepted when host_req && host_ready; host_ready is low while
// the addressed sub-system is busy (status reads excepted). Read data returns
// on host_rvalid/host_rdata one cycle after acceptance. cs_busy and cs_done
// (one-cycle pulse) report each sub-system. Sub-system count, bank size and
// bus width follow the design description; the host port is this
// implementation's own.
module m3d_accel_top
  import m3d_pkg::*;
#(
  localparam int unsigned CS_W   = $clog2(N_CS),
  localparam int unsigned ADDR_W = CS_W + 2 + RRAM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_req,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [BUS_W-1:0]  host_wdata,
  output logic              host_ready,
  output logic              host_rvalid,
  output logic [BUS_W-1:0]  host_rdata,
  output logic [N_CS-1:0]   cs_busy,
  output logic [N_CS-1:0]   cs_done
);

  logic [CS_W-1:0]    sel;
  region_e            region;
  logic [RRAM_AW-1:0] word;
  assign {sel, region, word} = host_addr;

  logic [N_CS-1:0]  cs_ready, cs_rvalid;
  logic [BUS_W-1:0] cs_rdata [N_CS];

  for (genvar i = 0; i < N_CS; i++) begin : g_cs
    logic               b_req, b_we, b_rvalid;
    logic [RRAM_AW-1:0] b_addr;
    logic [BUS_W-1:0]   b_wdata, b_rdata;

    compute_subsystem u_cs (
      .clk, .rst_n,
      .h_req      (host_req && sel == CS_W'(i)),
      .h_we       (host_we),
      .h_region   (region),
      .h_word     (word),
      .h_wdata    (host_wdata),
      .h_ready    (cs_ready[i]),
      .h_rvalid   (cs_rvalid[i]),
      .h_rdata    (cs_rdata[i]),
      .rram_req   (b_req),
      .rram_we    (b_we),
      .rram_addr  (b_addr),
      .rram_wdata (b_wdata),
      .rram_rvalid(b_rvalid),
      .rram_rdata (b_rdata),
      .busy       (cs_busy[i]),
      .done       (cs_done[i])
    );

    rram_bank #(.WIDTH(BUS_W), .BYTES(RRAM_BANK_BYTES)) u_bank (
      .clk, .rst_n,
      .req   (b_req),
      .we    (b_we),
      .addr  (b_addr),
      .wdata (b_wdata),
      .rvalid(b_rvalid),
      .rdata (b_rdata)
    );
  end

  assign host_ready = cs_ready[sel];

  // Only the sub-system that accepted the read answers.
  always_comb begin
    host_rvalid = 1'b0;
    host_rdata  = '0;
    for (int i = 0; i < N_CS; i++) begin
      if (cs_rvalid[i]) begin
        host_rvalid = 1'b1;
        host_rdata  = cs_rdata[i];
      end
    end
  end

endmodule
