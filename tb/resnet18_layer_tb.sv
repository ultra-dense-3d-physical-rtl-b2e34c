// resnet18_layer_tb: runs one full ResNet-18 convolution layer on the
// accelerator at its default size, first on all eight compute sub-systems and
// then on a single one, and checks every output of both runs.
// Default layer: the 3x3, 512-in / 512-out channel convolution of the last
// residual stage (7x7 output, stride 1, zero padding 1), with random 8-bit
// weights and activations. The testbench acts as the host:
//   * the 3x3x512 reduction is unrolled as q = (ky*3+kx)*C + c and cut into
//     16-channel tiles; output channels are cut into 16-channel tiles, and with
//     nu sub-systems in use, sub-system i owns output tiles i, i+nu, ... whose
//     weights are programmed into its own RRAM bank only;
//   * input vectors (im2col of the activations) are written to each used
//     sub-system's input buffer in chunks that fit its 2048 entries, and the
//     owned output tiles are processed in groups that fit the 512-entry output
//     buffer;
//   * for every reduction tile and owned output tile a tile command is queued
//     (write mode for the first reduction tile, accumulate mode after); the
//     host write stalls while the sub-system is busy, so the used sub-systems
//     run in parallel.
// The one-sub-system run has the compute and memory bandwidth of a planar chip
// with one CS and one 128-bit RRAM bus. Results are compared with a direct
// convolution computed here. The testbench reports the compute cycles
// (cycles with a sub-system busy, host loading excluded), the speedup of eight
// sub-systems over one (required to be at least 7.5, as the same tiles run
// eight at a time) and the MAC utilisation, and checks that every tile took
// the controller's cycle count.
module resnet18_layer_tb;
  import m3d_pkg::*;
  // Layer shape (ResNet-18, last stage 3x3 convolution).
  localparam int unsigned C  = 512;       // input channels
  localparam int unsigned K  = 512;       // output channels
  localparam int unsigned HW = 7;         // output (= input) height and width
  localparam int unsigned KS = 3;         // kernel size
  localparam int unsigned P  = HW * HW;   // output positions
  localparam int unsigned Q  = KS * KS * C;
  localparam int unsigned JT = Q / ROWS;  // reduction tiles
  localparam int unsigned KT = K / COLS;  // output-channel tiles
    localparam int unsigned CHUNK = IBUF_DEPTH / P;     // reduction tiles per input load
  localparam int unsigned ADDR_W = $clog2(N_CS) + 2 + RRAM_AW;
  localparam int unsigned TILE_CYCLES = ROWS + P + ROWS + COLS + 5;

  logic clk = 1'b0;
  logic rst_n;
  logic host_req, host_we, host_ready, host_rvalid;
  logic [ADDR_W-1:0] host_addr;
  logic [BUS_W-1:0] host_wdata, host_rdata;
  logic [N_CS-1:0] cs_busy, cs_done;
  int checks = 0, failures = 0;

  m3d_accel_top dut (.*);

  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] act [HW][HW][C];
  logic signed [DATA_W-1:0] wt  [Q][K];

  longint cycle = 0, busy_cycles = 0, tiles_done = 0, tile_len_bad = 0;
  longint started [N_CS];
  logic [N_CS-1:0] busy_q = '0;
  // busy rises the cycle after the start cycle; done pulses as busy falls.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    busy_q <= cs_busy;
    if (rst_n && |cs_busy) busy_cycles++;
    for (int i = 0; i < N_CS; i++) begin
      if (cs_busy[i] && !busy_q[i]) started[i] = cycle - 1;
      if (rst_n && cs_done[i]) begin
        tiles_done++;
        if (cycle - started[i] != longint'(TILE_CYCLES)) tile_len_bad++;
      end
    end
  end

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
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    host_req = 0;
    rd = host_rdata;
  endtask

  // Activation seen by output position p at reduction index q (zero padding).
  function automatic logic signed [DATA_W-1:0] im2col(input int p, input int q);
    int y, x, ky, kx, c;
    c  = q % C;
    kx = (q / C) % KS;
    ky = q / (C * KS);
    y  = p / HW + ky - KS / 2;
    x  = p % HW + kx - KS / 2;
    if (y < 0 || y >= HW || x < 0 || x >= HW) return '0;
    return act[y][x][c];
  endfunction

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference result, computed once.
  int ref_out [P][K];

  // Run the whole layer on sub-systems 0..nu-1. Sub-system i owns output
  // tiles i, i+nu, ...; they are processed in groups that fit its output
  // buffer, and for each group the inputs are streamed in chunks.
  task automatic run_layer(input int nu, output longint busy_used);
    logic [BUS_W-1:0] d, rd;
    cs_cmd_t cmd;
    int kpc, grp;
    longint b0;
    kpc = KT / nu;
    grp = OBUF_DEPTH / P;
    // Weights: owned tile m, reduction tile j, row r -> word (m*JT + j)*ROWS + r.
    for (int i = 0; i < nu; i++)
      for (int m = 0; m < kpc; m++)
        for (int j = 0; j < JT; j++)
          for (int r = 0; r < ROWS; r++) begin
            for (int k = 0; k < COLS; k++)
              d[k*DATA_W +: DATA_W] = wt[j*ROWS + r][(i + m*nu)*COLS + k];
            host(1, i, REG_RRAM, (m*JT + j)*ROWS + r, d, rd);
          end
    busy_used = 0;
    for (int g0 = 0; g0 < kpc; g0 += grp) begin
      int ng;
      ng = (kpc - g0 < grp) ? kpc - g0 : grp;
      for (int j0 = 0; j0 < JT; j0 += CHUNK) begin
        int nj;
        nj = (JT - j0 < CHUNK) ? JT - j0 : CHUNK;
        // Input vectors of this chunk (each write stalls until its sub-system is idle).
        for (int i = 0; i < nu; i++)
          for (int jj = 0; jj < nj; jj++)
            for (int p = 0; p < P; p++) begin
              for (int r = 0; r < ROWS; r++) d[r*DATA_W +: DATA_W] = im2col(p, (j0 + jj)*ROWS + r);
              host(1, i, REG_IBUF, jj*P + p, d, rd);
            end
        b0 = busy_cycles;
        for (int jj = 0; jj < nj; jj++)
          for (int mm = 0; mm < ng; mm++)
            for (int i = 0; i < nu; i++) begin
              cmd = '{accumulate: (j0 + jj) != 0, count: (IBUF_AW+1)'(P),
                      o_base: OBUF_AW'(mm*P), i_base: IBUF_AW'(jj*P),
                      w_base: RRAM_AW'(((g0 + mm)*JT + j0 + jj)*ROWS)};
              host(1, i, REG_CTRL, 0, BUS_W'(cmd), rd);
            end
        while (|cs_busy) @(negedge clk);
        @(negedge clk);
        busy_used += busy_cycles - b0;
      end
      // Results of this group.
      for (int i = 0; i < nu; i++)
        for (int mm = 0; mm < ng; mm++)
          for (int p = 0; p < P; p++) begin
            logic [OBUF_W-1:0] got, e;
            int kt;
            kt = i + (g0 + mm)*nu;
            for (int s = 0; s < OBUF_SLICES; s++) begin
              host(0, i, REG_OBUF, (mm*P + p)*OBUF_SLICES + s, '0, rd);
              got[s*BUS_W +: BUS_W] = rd;
            end
            for (int k = 0; k < COLS; k++) e[k*ACC_W +: ACC_W] = ACC_W'(ref_out[p][kt*COLS + k]);
            check(got == e, $sformatf("%0d sub-systems: output tile %0d position %0d", nu, kt, p));
          end
    end
  endtask

  initial begin
    longint busy8, busy1, tiles8;
    rst_n = 0; host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) for (int c = 0; c < C; c++)
      act[y][x][c] = DATA_W'($urandom);
    for (int q = 0; q < Q; q++) for (int k = 0; k < K; k++) wt[q][k] = DATA_W'($urandom);
    for (int p = 0; p < P; p++)
      for (int k = 0; k < K; k++) begin
        int acc;
        acc = 0;
        for (int q = 0; q < Q; q++) acc += int'(im2col(p, q)) * int'(wt[q][k]);
        ref_out[p][k] = acc;
      end

    // All eight sub-systems, each with its own RRAM bank.
    run_layer(N_CS, busy8);
    tiles8 = tiles_done;
    check(tiles8 == longint'(JT * KT), $sformatf("tiles run %0d of %0d", tiles8, JT * KT));
    // The same layer on one sub-system and one 128-bit bank.
    run_layer(1, busy1);
    check(tiles_done - tiles8 == longint'(JT * KT), "tiles run on one sub-system");
    check(tile_len_bad == 0, $sformatf("%0d tiles with a wrong cycle count", tile_len_bad));

    $display("layer %0dx%0dx%0d -> %0d, %0dx%0d kernel: %0d tiles", HW, HW, C, K, KS, KS, tiles8);
    $display("compute cycles: %0d on %0d sub-systems, %0d on one; speedup x%0d.%02d", busy8, N_CS, busy1,
             busy1 / busy8, (100 * busy1 / busy8) % 100);
    $display("MAC utilisation of the arrays: %0d%% (8 sub-systems), %0d%% (one)",
             (100 * longint'(P) * Q * K) / (busy8 * N_CS * ROWS * COLS),
             (100 * longint'(P) * Q * K) / (busy1 * ROWS * COLS));
    // Same tiles, eight at a time: the speedup can only fall short of N_CS by
    // the few cycles per chunk in which the host is still queueing commands.
    check(busy1 * 100 >= busy8 * (100 * N_CS - 50), "speedup of at least N_CS-0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
