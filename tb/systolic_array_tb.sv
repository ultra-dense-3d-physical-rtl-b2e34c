// systolic_array_tb: self-checking test of the 16x16 weight-stationary array.
// Loads random signed weights row by row, streams random input vectors (some
// cycles with no vector, some back to back, including the extreme values
// -128 and 127), and checks each output vector against a matrix-vector product
// computed here. Checks the latency of every vector (ROWS+COLS cycles), the
// full one-vector-per-cycle rate, and a second weight tile after a reload.
module systolic_array_tb;
  localparam int unsigned ROWS = 16, COLS = 16, DATA_W = 8, ACC_W = 32;
  localparam int unsigned LAT = ROWS + COLS;
  localparam int unsigned NVEC = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic w_row_we, in_valid, out_valid;
  logic [$clog2(ROWS)-1:0] w_row_sel;
  logic [COLS*DATA_W-1:0] w_row;
  logic [ROWS*DATA_W-1:0] in_vec;
  logic [COLS*ACC_W-1:0]  out_vec;
  int checks = 0, failures = 0;

  systolic_array #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] W [ROWS][COLS];
  logic [COLS*ACC_W-1:0] exp_q [$];
  longint in_time_q [$];
  longint cycle = 0;
  int outs = 0, back_to_back = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [COLS*ACC_W-1:0] reference(input logic [ROWS*DATA_W-1:0] x);
    logic [COLS*ACC_W-1:0] y;
    for (int k = 0; k < COLS; k++) begin
      int s = 0;
      for (int r = 0; r < ROWS; r++)
        s += int'(signed'(x[r*DATA_W +: DATA_W])) * int'(W[r][k]);
      y[k*ACC_W +: ACC_W] = ACC_W'(s);
    end
    return y;
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [COLS*ACC_W-1:0] e;
      longint t;
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        t = in_time_q.pop_front();
        check(out_vec == e, $sformatf("vector %0d value", outs));
        check(cycle - t == LAT, $sformatf("vector %0d latency %0d", outs, cycle - t));
        outs++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights(input int mode);
    for (int r = 0; r < ROWS; r++) begin
      for (int k = 0; k < COLS; k++) begin
        W[r][k] = (mode == 0) ? DATA_W'($urandom) : ((r == k) ? 8'sd1 : 8'sd0) * 8'(r + 1);
        w_row[k*DATA_W +: DATA_W] = W[r][k];
      end
      w_row_we = 1; w_row_sel = 4'(r);
      @(negedge clk);
    end
    w_row_we = 0;
  endtask

  task automatic stream(input int n, input int gaps);
    logic prev = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = (gaps == 0) || ($urandom_range(0, 2) != 0);
      for (int r = 0; r < ROWS; r++) begin
        in_vec[r*DATA_W +: DATA_W] = DATA_W'($urandom);
        if (i % 11 == 0) in_vec[r*DATA_W +: DATA_W] = (r % 2) ? 8'h80 : 8'h7f;
      end
      if (in_valid) begin
        exp_q.push_back(reference(in_vec));
        in_time_q.push_back(cycle);  // cycles counted at the monitor's edges
        if (prev) back_to_back++;
      end
      prev = in_valid;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; w_row_we = 0; w_row_sel = '0; w_row = '0; in_valid = 0; in_vec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_weights(0);
    stream(NVEC, 1);
    load_weights(1);
    stream(50, 0);
    load_weights(0);
    stream(NVEC, 0);
    check(outs > 0 && exp_q.size() == 0, $sformatf("all vectors returned (%0d left)", exp_q.size()));
    check(back_to_back > NVEC / 2, "back-to-back vectors exercised");
    $display("vectors=%0d back_to_back=%0d", outs, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
