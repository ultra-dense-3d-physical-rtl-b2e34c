// compute_subsystem: one compute sub-system (CS) of the accelerator.
//
// A CS holds a ROWS x COLS weight-stationary systolic array, a 32 KB input
// buffer (2048 input vectors of 16 x 8 bits), a 32 KB output buffer (512
// output vectors of 16 x 32 bits) and the controller that runs tile commands.
// It owns one port of its private RRAM bank, which carries the weights.
//
// Host port (one request per cycle, accepted when h_req && h_ready):
//   REG_RRAM  write programs RRAM word h_word, read returns it
//   REG_IBUF  write/read input-buffer entry h_word
//   REG_OBUF  read 128-bit slice h_word[1:0] of output entry h_word>>2
//   REG_CTRL  write: h_wdata[CMD_W-1:0] is a cs_cmd_t, the tile starts;
//             read: {done count (16 bits), busy}
// While a tile runs the controller owns the RRAM bank and both buffers, so
// every host request other than a status read is held off (h_ready low): this
// is the stall a host sees. A read returns h_rvalid/h_rdata one cycle after
// it is accepted. rram_wdata is the host write data passed straight through,
// as only the host programs the RRAM. Eight identical CS run side by side in the M3D design, as
// the description gives; the host port and the stall rule are this
// implementation's own.
module compute_subsystem
  import m3d_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host port
  input  logic               h_req,
  input  logic               h_we,
  input  region_e            h_region,
  input  logic [RRAM_AW-1:0] h_word,
  input  logic [BUS_W-1:0]   h_wdata,
  output logic               h_ready,
  output logic               h_rvalid,
  output logic [BUS_W-1:0]   h_rdata,
  // private RRAM bank port
  output logic               rram_req,
  output logic               rram_we,
  output logic [RRAM_AW-1:0] rram_addr,
  output logic [BUS_W-1:0]   rram_wdata,
  input  logic               rram_rvalid,
  input  logic [BUS_W-1:0]   rram_rdata,
  // status
  output logic               busy,
  output logic               done
);

  localparam int unsigned RSEL_W = $clog2(ROWS);
  localparam int unsigned SL_W   = $clog2(OBUF_SLICES);

  logic accept, start;
  assign h_ready = !busy || (h_region == REG_CTRL && !h_we);
  assign accept  = h_req && h_ready;
  assign start   = accept && h_we && h_region == REG_CTRL;

  // Controller <-> array / buffers / RRAM.
  logic               c_rram_req;
  logic [RRAM_AW-1:0] c_rram_addr;
  logic               arr_w_we;
  logic [RSEL_W-1:0]  arr_w_sel;
  logic [BUS_W-1:0]   arr_w_row;
  logic               arr_in_valid, arr_out_valid;
  logic [IBUF_W-1:0]  arr_in_vec;
  logic [OBUF_W-1:0]  arr_out_vec;
  logic               c_ibuf_re, c_obuf_re, obuf_we;
  logic [IBUF_AW-1:0] c_ibuf_raddr;
  logic [OBUF_AW-1:0] c_obuf_raddr, obuf_waddr;
  logic [IBUF_W-1:0]  ibuf_rdata;
  logic [OBUF_W-1:0]  obuf_rdata, obuf_wdata;

  cs_controller u_ctrl (
    .clk, .rst_n,
    .start       (start),
    .cmd         (cs_cmd_t'(h_wdata[CMD_W-1:0])),
    .busy        (busy),
    .done        (done),
    .rram_req    (c_rram_req),
    .rram_addr   (c_rram_addr),
    .rram_rvalid (rram_rvalid),
    .rram_rdata  (rram_rdata),
    .arr_w_we, .arr_w_sel, .arr_w_row,
    .arr_in_valid, .arr_in_vec, .arr_out_valid, .arr_out_vec,
    .ibuf_re     (c_ibuf_re),
    .ibuf_raddr  (c_ibuf_raddr),
    .ibuf_rdata  (ibuf_rdata),
    .obuf_re     (c_obuf_re),
    .obuf_raddr  (c_obuf_raddr),
    .obuf_rdata  (obuf_rdata),
    .obuf_we, .obuf_waddr, .obuf_wdata
  );

  systolic_array #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_array (
    .clk, .rst_n,
    .w_row_we  (arr_w_we),
    .w_row_sel (arr_w_sel),
    .w_row     (arr_w_row),
    .in_valid  (arr_in_valid),
    .in_vec    (arr_in_vec),
    .out_valid (arr_out_valid),
    .out_vec   (arr_out_vec)
  );

  // RRAM bank: controller while busy, host otherwise.
  assign rram_req   = busy ? c_rram_req  : (accept && h_region == REG_RRAM);
  assign rram_we    = busy ? 1'b0        : h_we;
  assign rram_addr  = busy ? c_rram_addr : h_word;
  assign rram_wdata = h_wdata;

  // Input buffer: host writes, controller (or idle host) reads.
  sram_buffer #(.WIDTH(IBUF_W), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk,
    .we    (accept && h_we && h_region == REG_IBUF),
    .waddr (h_word[IBUF_AW-1:0]),
    .wdata (h_wdata),
    .re    (busy ? c_ibuf_re : (accept && !h_we && h_region == REG_IBUF)),
    .raddr (busy ? c_ibuf_raddr : h_word[IBUF_AW-1:0]),
    .rdata (ibuf_rdata)
  );

  // Output buffer: controller writes, controller (or idle host) reads.
  sram_buffer #(.WIDTH(OBUF_W), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk,
    .we    (obuf_we),
    .waddr (obuf_waddr),
    .wdata (obuf_wdata),
    .re    (busy ? c_obuf_re : (accept && !h_we && h_region == REG_OBUF)),
    .raddr (busy ? c_obuf_raddr : h_word[SL_W +: OBUF_AW]),
    .rdata (obuf_rdata)
  );

  // Status and read responses.
  logic [15:0]     done_cnt_q;
  region_e         resp_region_q;
  logic [SL_W-1:0] resp_slice_q;
  logic            busy_snap_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_cnt_q    <= '0;
      h_rvalid      <= 1'b0;
      resp_region_q <= REG_RRAM;
      resp_slice_q  <= '0;
      busy_snap_q   <= 1'b0;
    end else begin
      if (done) done_cnt_q <= done_cnt_q + 1'b1;
      h_rvalid <= accept && !h_we;
      if (accept && !h_we) begin
        resp_region_q <= h_region;
        resp_slice_q  <= h_word[SL_W-1:0];
        busy_snap_q   <= busy;
      end
    end
  end

  always_comb begin
    unique case (resp_region_q)
      REG_RRAM: h_rdata = rram_rdata;
      REG_IBUF: h_rdata = ibuf_rdata;
      REG_OBUF: h_rdata = obuf_rdata[resp_slice_q*BUS_W +: BUS_W];
      REG_CTRL: h_rdata = BUS_W'({done_cnt_q, busy_snap_q});
      default:  h_rdata = '0;
    endcase
  end

  // A host request is never accepted into a resource the controller owns.
  always_ff @(posedge clk) begin
    if (rst_n && busy && accept) assert (h_region == REG_CTRL && !h_we)
      else $error("host access accepted while the sub-system is busy");
  end

endmodule
