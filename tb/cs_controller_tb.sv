// cs_controller_tb: self-checking test of the compute sub-system controller.
// The controller is surrounded by simple models written here: an RRAM bank and
// an input buffer whose read data is a known function of the address (one
// cycle latency), an array stand-in that returns a known function of each
// input vector after the array latency, and an output buffer memory. Runs
// overwrite and accumulate commands with different bases and counts and checks
// the weight rows loaded (order, row select, data), the input vectors
// streamed, the output-buffer contents and the cycle at which done rises.
module cs_controller_tb;
  import m3d_pkg::*;
  localparam int unsigned L = ROWS + COLS;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  cs_cmd_t cmd;
  logic rram_req, rram_rvalid;
  logic [RRAM_AW-1:0] rram_addr;
  logic [BUS_W-1:0] rram_rdata;
  logic arr_w_we, arr_in_valid, arr_out_valid;
  logic [$clog2(ROWS)-1:0] arr_w_sel;
  logic [BUS_W-1:0] arr_w_row;
  logic [IBUF_W-1:0] arr_in_vec, ibuf_rdata;
  logic [OBUF_W-1:0] arr_out_vec, obuf_rdata, obuf_wdata;
  logic ibuf_re, obuf_re, obuf_we;
  logic [IBUF_AW-1:0] ibuf_raddr;
  logic [OBUF_AW-1:0] obuf_raddr, obuf_waddr;
  int checks = 0, failures = 0;

  cs_controller dut (.*);

  always #5 clk = ~clk;

  function automatic logic [BUS_W-1:0] wfun(input logic [RRAM_AW-1:0] a);
    return {4{32'(a) * 32'h01000193 + 32'h5bd1e995}};
  endfunction
  function automatic logic [IBUF_W-1:0] ifun(input logic [IBUF_AW-1:0] a);
    return {4{32'(a) * 32'h9E3779B1 + 32'h1234}};
  endfunction
  function automatic logic [OBUF_W-1:0] afun(input logic [IBUF_W-1:0] x);
    logic [OBUF_W-1:0] y;
    for (int k = 0; k < COLS; k++) y[k*ACC_W +: ACC_W] = 32'(x) + 32'(k) * 32'h10001;
    return y;
  endfunction

  // RRAM and input-buffer models.
  always_ff @(posedge clk) begin
    rram_rvalid <= rst_n && rram_req;
    if (rram_req) rram_rdata <= wfun(rram_addr);
    if (ibuf_re)  ibuf_rdata <= ifun(ibuf_raddr);
  end

  // Array stand-in: fixed latency L, output = afun(input).
  logic [L-1:0]      vq;
  logic [OBUF_W-1:0] dq [L];
  always_ff @(posedge clk) begin
    if (!rst_n) vq <= '0;
    else        vq <= {vq[L-2:0], arr_in_valid};
    dq[0] <= afun(arr_in_vec);
    for (int i = 1; i < L; i++) dq[i] <= dq[i-1];
  end
  assign arr_out_valid = vq[L-1];
  assign arr_out_vec   = dq[L-1];

  // Output buffer model.
  logic [OBUF_W-1:0] obuf [OBUF_DEPTH];
  always_ff @(posedge clk) begin
    if (obuf_we) obuf[obuf_waddr] <= obuf_wdata;
    if (obuf_re) obuf_rdata <= obuf[obuf_raddr];
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Monitors for weight rows and streamed inputs.
  int wrow_n, in_n;
  cs_cmd_t cur;
  always @(posedge clk) begin
    if (rst_n && arr_w_we) begin
      check(32'(arr_w_sel) == wrow_n && arr_w_row == wfun(cur.w_base + RRAM_AW'(wrow_n)),
            $sformatf("weight row %0d", wrow_n));
      wrow_n++;
    end
    if (rst_n && arr_in_valid) begin
      check(wrow_n == ROWS, "inputs only after the whole weight tile");
      check(arr_in_vec == ifun(cur.i_base + IBUF_AW'(in_n)), $sformatf("input %0d", in_n));
      in_n++;
    end
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [OBUF_W-1:0] prev_obuf [OBUF_DEPTH];

  task automatic run(input logic [RRAM_AW-1:0] wb, input int ib, input int ob, input int t, input bit acc);
    longint c0;
    for (int i = 0; i < OBUF_DEPTH; i++) prev_obuf[i] = obuf[i];
    cur = '{accumulate: acc, count: (IBUF_AW+1)'(t), o_base: OBUF_AW'(ob),
            i_base: IBUF_AW'(ib), w_base: wb};
    cmd = cur;
    wrow_n = 0; in_n = 0;
    @(negedge clk);
    start = 1;
    c0 = cycle;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    check(cycle - c0 == longint'(ROWS + t + L + 5),
          $sformatf("done after %0d cycles, expected %0d", cycle - c0, ROWS + t + L + 5));
    @(negedge clk);
    check(!busy, "idle after done");
    check(wrow_n == ROWS && in_n == t, "all rows and inputs");
    for (int i = 0; i < OBUF_DEPTH; i++) begin
      int n = (i - ob + OBUF_DEPTH) % OBUF_DEPTH;
      logic [OBUF_W-1:0] e;
      if (n < t) begin
        e = afun(ifun(IBUF_AW'(ib + n)));
        if (acc)
          for (int k = 0; k < COLS; k++)
            e[k*ACC_W +: ACC_W] = e[k*ACC_W +: ACC_W] + prev_obuf[i][k*ACC_W +: ACC_W];
        check(obuf[i] == e, $sformatf("output entry %0d", i));
      end else if (i % 16 == 0) begin
        check(obuf[i] == prev_obuf[i], $sformatf("entry %0d untouched", i));
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; cmd = '0;
    for (int i = 0; i < OBUF_DEPTH; i++) obuf[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(19'd100, 0, 0, 40, 1'b0);
    run(19'd7, 5, 0, 40, 1'b1);          // accumulate on top of the first results
    run(19'h7FFF0, 2040, 500, 30, 1'b0); // addresses wrap in all three memories
    run(19'd3, 9, 60, 1, 1'b1);
    run(19'd0, 0, 0, 512, 1'b0);         // full output buffer
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
