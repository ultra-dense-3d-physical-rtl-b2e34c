// m3d_accel_top_tb: end-to-end test of the accelerator at its default size
// (8 compute sub-systems, 8 x 8 MB RRAM, 16x16 arrays).
// One convolution-like layer, 32 input channels x 64 output channels over 64
// output positions, is split into 8 parts: sub-system i computes output
// channels 16*(i%4)..+15 for positions 32*(i/4)..+31. The host programs each
// part's weights into that sub-system's own RRAM bank, writes its inputs,
// starts the first 16-channel tile on all eight sub-systems, then queues the
// second tile (accumulate mode) on each, which stalls until that sub-system is
// free. All results are read back and compared with the layer computed here.
// Counted and required at least once: tiles in overwrite and accumulate mode,
// host stalls, status reads seeing busy, and cycles with all eight
// sub-systems busy at once. Also checks that the layer takes no more cycles
// than the eight parallel tile pairs plus host overhead, against 16 tiles in
// sequence on a single sub-system.
module m3d_accel_top_tb;
  import m3d_pkg::*;
  localparam int unsigned K = 64, C = 32, P = 64;
  localparam int unsigned PP = P / 2;           // positions per part
  localparam int unsigned ADDR_W = $clog2(N_CS) + 2 + RRAM_AW;
  localparam int unsigned TILE_CYCLES = ROWS + PP + ROWS + COLS + 5;

  logic clk = 1'b0;
  logic rst_n;
  logic host_req, host_we, host_ready, host_rvalid;
  logic [ADDR_W-1:0] host_addr;
  logic [BUS_W-1:0] host_wdata, host_rdata;
  logic [N_CS-1:0] cs_busy, cs_done;
  int checks = 0, failures = 0;
  int stalls = 0, busy_status = 0, all_busy_cycles = 0, tiles_over = 0, tiles_acc = 0, dones = 0;

  m3d_accel_top dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && &cs_busy) all_busy_cycles++;
    if (rst_n) dones += $countones(cs_done);
  end

  logic signed [DATA_W-1:0] W [C][K];
  logic signed [DATA_W-1:0] X [P][C];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic host(input bit we, input int cs, input region_e rg, input int word,
                      input logic [BUS_W-1:0] wd, output logic [BUS_W-1:0] rd);
    host_req = 1; host_we = we; host_wdata = wd;
    host_addr = {($clog2(N_CS))'(cs), rg, RRAM_AW'(word)};
    #1;
    while (!host_ready) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    host_req = 0;
    rd = host_rdata;
    if (!we) check(host_rvalid, "read response valid");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BUS_W-1:0] d, rd;
    cs_cmd_t cmd;
    longint t0, t1;
    rst_n = 0; host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < C; c++) for (int k = 0; k < K; k++) W[c][k] = DATA_W'($urandom);
    for (int p = 0; p < P; p++) for (int c = 0; c < C; c++) X[p][c] = DATA_W'($urandom);

    // Weights and inputs of every part.
    for (int i = 0; i < N_CS; i++) begin
      int kt, ph;
      kt = i % 4; ph = i / 4;
      for (int c = 0; c < C; c++) begin
        for (int k = 0; k < COLS; k++) d[k*DATA_W +: DATA_W] = W[c][kt*COLS + k];
        host(1, i, REG_RRAM, c, d, rd);
      end
      for (int j = 0; j < 2; j++)
        for (int p = 0; p < PP; p++) begin
          for (int r = 0; r < ROWS; r++) d[r*DATA_W +: DATA_W] = X[ph*PP + p][j*ROWS + r];
          host(1, i, REG_IBUF, j*PP + p, d, rd);
        end
    end

    // First tile everywhere, then the accumulating second tile on each.
    t0 = cycle;
    for (int i = 0; i < N_CS; i++) begin
      cmd = '{accumulate: 1'b0, count: (IBUF_AW+1)'(PP), o_base: '0, i_base: '0, w_base: '0};
      host(1, i, REG_CTRL, 0, BUS_W'(cmd), rd);
      tiles_over++;
    end
    for (int i = 0; i < N_CS; i++) begin
      host(0, i, REG_CTRL, 0, '0, rd);
      if (rd[0]) busy_status++;
    end
    for (int i = 0; i < N_CS; i++) begin
      cmd = '{accumulate: 1'b1, count: (IBUF_AW+1)'(PP), o_base: '0,
              i_base: IBUF_AW'(PP), w_base: RRAM_AW'(ROWS)};
      host(1, i, REG_CTRL, 0, BUS_W'(cmd), rd);
      tiles_acc++;
    end
    while (|cs_busy) @(negedge clk);
    t1 = cycle;
    @(negedge clk);
    $display("layer: %0d cycles on %0d sub-systems; one sub-system needs %0d",
             t1 - t0, N_CS, 2 * N_CS * TILE_CYCLES);
    check(t1 - t0 <= 2 * TILE_CYCLES + 4 * N_CS + 8, "parallel layer time");
    check(dones == 2 * N_CS, $sformatf("done pulses %0d", dones));

    for (int i = 0; i < N_CS; i++) begin
      host(0, i, REG_CTRL, 0, '0, rd);
      check(rd[0] == 1'b0 && rd[16:1] == 16'd2, $sformatf("status of sub-system %0d", i));
    end

    // Results.
    for (int i = 0; i < N_CS; i++) begin
      int kt, ph;
      kt = i % 4; ph = i / 4;
      for (int p = 0; p < PP; p++) begin
        logic [OBUF_W-1:0] got, e;
        for (int s = 0; s < OBUF_SLICES; s++) begin
          host(0, i, REG_OBUF, p*OBUF_SLICES + s, '0, rd);
          got[s*BUS_W +: BUS_W] = rd;
        end
        for (int k = 0; k < COLS; k++) begin
          int acc;
          acc = 0;
          for (int c = 0; c < C; c++) acc += int'(X[ph*PP + p][c]) * int'(W[c][kt*COLS + k]);
          e[k*ACC_W +: ACC_W] = ACC_W'(acc);
        end
        check(got == e, $sformatf("sub-system %0d position %0d", i, p));
      end
    end

    $display("overwrite tiles=%0d accumulate tiles=%0d stalls=%0d busy status reads=%0d all-busy cycles=%0d",
             tiles_over, tiles_acc, stalls, busy_status, all_busy_cycles);
    check(tiles_over > 0, "overwrite tile exercised");
    check(tiles_acc > 0, "accumulate tile exercised");
    check(stalls > 0, "host stall exercised");
    check(busy_status > 0, "status read while busy exercised");
    check(all_busy_cycles > 0, "all sub-systems busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
