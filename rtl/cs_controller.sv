// cs_controller: sequencer of one compute sub-system.
//
// A command (cs_cmd_t) is taken when start is high while the controller is
// idle. It then runs three phases:
//   LOAD   - reads ROWS consecutive words from its RRAM bank starting at
//            w_base; word r (128 bits = COLS weights) becomes row r of the
//            array. Reads are issued back to back, one per cycle.
//   STREAM - reads count input vectors from the input buffer (i_base upward,
//            one per cycle) and pushes each into the array the cycle after.
//   DRAIN  - waits until all count results have left the array.
// Each result leaving the array goes through a two-stage write-back: in the
// first cycle the old output-buffer entry is read (only used in accumulate
// mode) and in the second the result, plus the old entry when accumulating,
// is written to o_base + n. done pulses for one cycle when the last result is
// written; busy is high from the cycle after start up to the cycle before.
// Weight rows are not re-registered: arr_w_row is the RRAM read data itself,
// qualified by arr_w_we and arr_w_sel.
// Timing for count = T > 0 and an array of latency L = ROWS+COLS: if start is
// high in clock cycle c, done is high in cycle c+ROWS+T+L+5 (ROWS+1 cycles of
// weight load, T cycles of streaming at one vector per cycle, the array
// latency and the buffer/write-back registers).
// The design description names memory controllers but not their behaviour; this command
// format, the phase order (weights are not double-buffered) and accumulate
// mode are this implementation's.
module cs_controller
  import m3d_pkg::*;
#(
  localparam int unsigned RSEL_W = $clog2(m3d_pkg::ROWS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  cs_cmd_t               cmd,
  output logic                  busy,
  output logic                  done,
  // RRAM bank read port
  output logic                  rram_req,
  output logic [RRAM_AW-1:0]    rram_addr,
  input  logic                  rram_rvalid,
  input  logic [BUS_W-1:0]      rram_rdata,
  // systolic array
  output logic                  arr_w_we,
  output logic [RSEL_W-1:0]     arr_w_sel,
  output logic [BUS_W-1:0]      arr_w_row,
  output logic                  arr_in_valid,
  output logic [IBUF_W-1:0]     arr_in_vec,
  input  logic                  arr_out_valid,
  input  logic [OBUF_W-1:0]     arr_out_vec,
  // input buffer read port
  output logic                  ibuf_re,
  output logic [IBUF_AW-1:0]    ibuf_raddr,
  input  logic [IBUF_W-1:0]     ibuf_rdata,
  // output buffer ports
  output logic                  obuf_re,
  output logic [OBUF_AW-1:0]    obuf_raddr,
  input  logic [OBUF_W-1:0]     obuf_rdata,
  output logic                  obuf_we,
  output logic [OBUF_AW-1:0]    obuf_waddr,
  output logic [OBUF_W-1:0]     obuf_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STREAM, S_DRAIN} state_e;

  state_e             state_q;
  cs_cmd_t            cmd_q;
  logic [RSEL_W:0]    w_issue_q;    // weight rows requested
  logic [RSEL_W:0]    w_recv_q;     // weight rows received
  logic [IBUF_AW:0]   i_issue_q;    // input vectors read
  logic               ird_q;        // input buffer data valid this cycle
  logic [IBUF_AW:0]   out_cnt_q;    // results taken from the array
  logic [IBUF_AW:0]   wr_cnt_q;     // results written back
  logic               wb_q;         // write-back stage holds a result
  logic [OBUF_AW-1:0] wb_addr_q;
  logic [OBUF_W-1:0]  wb_vec_q;

  assign busy = (state_q != S_IDLE);

  // Requests issued in the current cycle.
  assign rram_req   = (state_q == S_LOAD) && (w_issue_q < (RSEL_W+1)'(m3d_pkg::ROWS));
  assign rram_addr  = cmd_q.w_base + RRAM_AW'(w_issue_q);
  assign ibuf_re    = (state_q == S_STREAM) && (i_issue_q < cmd_q.count);
  assign ibuf_raddr = cmd_q.i_base + IBUF_AW'(i_issue_q);

  // Weight rows go straight from the RRAM read data into the array.
  assign arr_w_we  = (state_q == S_LOAD) && rram_rvalid;
  assign arr_w_sel = w_recv_q[RSEL_W-1:0];
  assign arr_w_row = rram_rdata;

  assign arr_in_valid = ird_q;
  assign arr_in_vec   = ird_q ? ibuf_rdata : '0;

  // Write-back stage 1: read the old entry for the result now leaving the array.
  assign obuf_re    = arr_out_valid;
  assign obuf_raddr = cmd_q.o_base + OBUF_AW'(out_cnt_q);

  // Write-back stage 2: write result (+ old entry when accumulating).
  always_comb begin
    obuf_we    = wb_q;
    obuf_waddr = wb_addr_q;
    for (int k = 0; k < OBUF_W/ACC_W; k++) begin
      obuf_wdata[k*ACC_W +: ACC_W] = wb_vec_q[k*ACC_W +: ACC_W]
          + (cmd_q.accumulate ? obuf_rdata[k*ACC_W +: ACC_W] : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cmd_q     <= '0;
      w_issue_q <= '0;
      w_recv_q  <= '0;
      i_issue_q <= '0;
      ird_q     <= 1'b0;
      out_cnt_q <= '0;
      wr_cnt_q  <= '0;
      wb_q      <= 1'b0;
      wb_addr_q <= '0;
      wb_vec_q  <= '0;
      done      <= 1'b0;
    end else begin
      done  <= 1'b0;
      ird_q <= ibuf_re;
      wb_q  <= arr_out_valid;
      if (arr_out_valid) begin
        wb_addr_q <= obuf_raddr;
        wb_vec_q  <= arr_out_vec;
        out_cnt_q <= out_cnt_q + 1'b1;
      end
      if (wb_q) wr_cnt_q <= wr_cnt_q + 1'b1;
      if (rram_req) w_issue_q <= w_issue_q + 1'b1;
      if (arr_w_we) w_recv_q <= w_recv_q + 1'b1;
      if (ibuf_re)  i_issue_q <= i_issue_q + 1'b1;

      unique case (state_q)
        S_IDLE: if (start) begin
          cmd_q     <= cmd;
          w_issue_q <= '0;
          w_recv_q  <= '0;
          i_issue_q <= '0;
          out_cnt_q <= '0;
          wr_cnt_q  <= '0;
          state_q   <= S_LOAD;
        end
        S_LOAD: if (arr_w_we && w_recv_q == (RSEL_W+1)'(m3d_pkg::ROWS-1)) state_q <= S_STREAM;
        S_STREAM: if (!ibuf_re || i_issue_q + 1'b1 == cmd_q.count) state_q <= S_DRAIN;
        S_DRAIN: if (wr_cnt_q == cmd_q.count) begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The weight row bus carries exactly one row of the array.
  initial assert (BUS_W == m3d_pkg::COLS*DATA_W)
    else $error("weight row must fit the RRAM bus");

endmodule
