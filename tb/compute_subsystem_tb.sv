// compute_subsystem_tb: end-to-end test of one compute sub-system with its
// 8 MB RRAM bank.
// Through the host port it programs two 16x16 signed weight tiles into RRAM,
// writes input vectors for a 32-input-channel layer into the input buffer,
// runs the first tile in overwrite mode and the second in accumulate mode,
// and reads the results back; they must equal the 32-channel matrix product
// computed here. While the sub-system is busy it checks that a buffer write is
// stalled (and lands afterwards), that a status read is served and reports
// busy, and it checks the command's cycle count and the done counter.
module compute_subsystem_tb;
  import m3d_pkg::*;
  localparam int unsigned T = 64;           // vectors (output pixels)
  localparam int unsigned C = 2 * ROWS;     // input channels: two tiles

  logic clk = 1'b0;
  logic rst_n;
  logic h_req, h_we, h_ready, h_rvalid, busy, done;
  region_e h_region;
  logic [RRAM_AW-1:0] h_word;
  logic [BUS_W-1:0] h_wdata, h_rdata;
  logic rram_req, rram_we, rram_rvalid;
  logic [RRAM_AW-1:0] rram_addr;
  logic [BUS_W-1:0] rram_wdata, rram_rdata;
  int checks = 0, failures = 0, stalls = 0;

  compute_subsystem dut (.*);
  rram_bank #(.WIDTH(BUS_W), .BYTES(RRAM_BANK_BYTES)) u_bank (
    .clk, .rst_n, .req(rram_req), .we(rram_we), .addr(rram_addr),
    .wdata(rram_wdata), .rvalid(rram_rvalid), .rdata(rram_rdata));

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  longint done_cycle = -1;
  always @(posedge clk) if (done) done_cycle <= cycle;

  logic signed [DATA_W-1:0] W [C][COLS];
  logic signed [DATA_W-1:0] X [T][C];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One host request, driven at the falling edge; waits while h_ready is low.
  task automatic host(input bit we, input region_e rg, input int word,
                      input logic [BUS_W-1:0] wd, output logic [BUS_W-1:0] rd);
    h_req = 1; h_we = we; h_region = rg; h_word = RRAM_AW'(word); h_wdata = wd;
    #1;
    while (!h_ready) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    h_req = 0;
    rd = h_rdata;
    if (!we) check(h_rvalid, "read response valid");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BUS_W-1:0] d, rd;
    cs_cmd_t cmd;
    longint t_start;
    rst_n = 0; h_req = 0; h_we = 0; h_region = REG_RRAM; h_word = '0; h_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < C; c++) for (int k = 0; k < COLS; k++) W[c][k] = DATA_W'($urandom);
    for (int t = 0; t < T; t++) for (int c = 0; c < C; c++) X[t][c] = DATA_W'($urandom);
    W[0][0] = -8'sd128; X[0][0] = -8'sd128;

    // Weight tile j, row r (input channel 16j+r) -> RRAM word 16j+r.
    for (int c = 0; c < C; c++) begin
      for (int k = 0; k < COLS; k++) d[k*DATA_W +: DATA_W] = W[c][k];
      host(1, REG_RRAM, c, d, rd);
    end
    for (int c = 0; c < C; c++) begin
      host(0, REG_RRAM, c, '0, rd);
      for (int k = 0; k < COLS; k++) d[k*DATA_W +: DATA_W] = W[c][k];
      check(rd == d, $sformatf("RRAM read-back %0d", c));
    end
    // Inputs: tile j of vector t -> input buffer entry j*T + t.
    for (int j = 0; j < 2; j++)
      for (int t = 0; t < T; t++) begin
        for (int r = 0; r < ROWS; r++) d[r*DATA_W +: DATA_W] = X[t][j*ROWS + r];
        host(1, REG_IBUF, j*T + t, d, rd);
      end

    // Tile 0, overwrite.
    cmd = '{accumulate: 1'b0, count: (IBUF_AW+1)'(T), o_base: '0, i_base: '0, w_base: '0};
    host(1, REG_CTRL, 0, BUS_W'(cmd), rd);
    t_start = cycle - 1;
    check(busy, "busy after start");
    host(0, REG_CTRL, 0, '0, rd);
    check(rd[0] == 1'b1, "status shows busy");
    // This write must wait for the tile to finish.
    host(1, REG_IBUF, 2000, {8{16'hBEEF}}, rd);
    check(stalls > 0, "host write stalled while busy");
    check(done_cycle - t_start == longint'(ROWS + T + ROWS + COLS + 5),
          $sformatf("tile took %0d cycles, expected %0d", done_cycle - t_start, ROWS + T + ROWS + COLS + 5));

    // Tile 1, accumulate into the same outputs.
    cmd = '{accumulate: 1'b1, count: (IBUF_AW+1)'(T), o_base: '0, i_base: IBUF_AW'(T), w_base: RRAM_AW'(ROWS)};
    host(1, REG_CTRL, 0, BUS_W'(cmd), rd);
    while (busy) @(negedge clk);

    host(0, REG_CTRL, 0, '0, rd);
    check(rd[0] == 1'b0 && rd[16:1] == 16'd2, "status: idle, two tiles done");
    host(0, REG_IBUF, 2000, '0, rd);
    check(rd == {8{16'hBEEF}}, "stalled write landed");

    for (int t = 0; t < T; t++) begin
      logic [OBUF_W-1:0] got, e;
      for (int s = 0; s < OBUF_SLICES; s++) begin
        host(0, REG_OBUF, t*OBUF_SLICES + s, '0, rd);
        got[s*BUS_W +: BUS_W] = rd;
      end
      for (int k = 0; k < COLS; k++) begin
        int acc;
        acc = 0;
        for (int c = 0; c < C; c++) acc += int'(X[t][c]) * int'(W[c][k]);
        e[k*ACC_W +: ACC_W] = ACC_W'(acc);
      end
      check(got == e, $sformatf("output vector %0d", t));
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
