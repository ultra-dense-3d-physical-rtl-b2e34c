// systolic_array: ROWS x COLS weight-stationary systolic array of accel_pe.
//
// Row r of the array belongs to input channel r and column k to output channel
// k; PE(r,k) holds weight W[r][k]. One input vector x (one activation per
// input channel) is accepted per cycle, aligned on in_vec; the array returns
// y[k] = sum_r x[r]*W[r][k] for every output channel, aligned on out_vec.
//
// Activations move right one PE per cycle and partial sums move down one PE
// per cycle, so row r is fed through a skew line of r registers and column k
// is drained through a de-skew line of COLS-1-k registers, followed by one
// output register. A vector presented in clock cycle c appears on out_vec,
// with out_valid, in cycle c+LATENCY, LATENCY = ROWS+COLS, at one vector per
// cycle. Weights are written one row per cycle
// (w_row_we, w_row_sel, w_row); the controller only does so while no vector is
// in flight. Vector element i sits at bits [i*W +: W]. The array size follows
// the design description; the mapping and the skew arrangement are this
// implementation's.
module systolic_array #(
  parameter int unsigned ROWS   = 16,
  parameter int unsigned COLS   = 16,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 32,
  localparam int unsigned LATENCY = ROWS + COLS,
  localparam int unsigned RSEL_W  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_row_we,
  input  logic [RSEL_W-1:0]        w_row_sel,
  input  logic [COLS*DATA_W-1:0]   w_row,
  input  logic                     in_valid,
  input  logic [ROWS*DATA_W-1:0]   in_vec,
  output logic                     out_valid,
  output logic [COLS*ACC_W-1:0]    out_vec
);

  // Wires between PEs: act[r][k] / vld[r][k] enter PE(r,k) from the left,
  // psum[r][k] enters PE(r,k) from above.
  logic [DATA_W-1:0] act  [ROWS][COLS+1];
  logic              vld  [ROWS][COLS+1];
  logic [ACC_W-1:0]  psum [ROWS+1][COLS];

  // Input skew: row r delayed by r cycles.
  for (genvar r = 0; r < ROWS; r++) begin : g_skew
    if (r == 0) begin : g_direct
      assign act[0][0] = in_vec[0 +: DATA_W];
      assign vld[0][0] = in_valid;
    end else begin : g_delay
      logic [DATA_W-1:0] dq [r];
      logic              vq [r];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < r; i++) begin
            dq[i] <= '0;
            vq[i] <= 1'b0;
          end
        end else begin
          dq[0] <= in_vec[r*DATA_W +: DATA_W];
          vq[0] <= in_valid;
          for (int i = 1; i < r; i++) begin
            dq[i] <= dq[i-1];
            vq[i] <= vq[i-1];
          end
        end
      end
      assign act[r][0] = dq[r-1];
      assign vld[r][0] = vq[r-1];
    end
  end

  for (genvar k = 0; k < COLS; k++) begin : g_top
    assign psum[0][k] = '0;
  end

  // PE grid.
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar k = 0; k < COLS; k++) begin : g_col
      accel_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
        .clk          (clk),
        .rst_n        (rst_n),
        .w_load       (w_row_we && (w_row_sel == RSEL_W'(r))),
        .w_in         (w_row[k*DATA_W +: DATA_W]),
        .act_valid_in (vld[r][k]),
        .act_in       (act[r][k]),
        .psum_in      (psum[r][k]),
        .act_valid_out(vld[r][k+1]),
        .act_out      (act[r][k+1]),
        .psum_out     (psum[r+1][k])
      );
    end
  end

  // Output de-skew: column k delayed by COLS-1-k cycles, then one output register.
  logic [ACC_W-1:0] col_aligned [COLS];
  for (genvar k = 0; k < COLS; k++) begin : g_deskew
    if (k == COLS-1) begin : g_direct
      assign col_aligned[k] = psum[ROWS][k];
    end else begin : g_delay
      logic [ACC_W-1:0] pq [COLS-1-k];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < COLS-1-k; i++) pq[i] <= '0;
        end else begin
          pq[0] <= psum[ROWS][k];
          for (int i = 1; i < COLS-1-k; i++) pq[i] <= pq[i-1];
        end
      end
      assign col_aligned[k] = pq[COLS-2-k];
    end
  end

  // Valid pipeline matching the data path: LATENCY-1 stages plus the output register.
  logic [LATENCY-2:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe     <= '0;
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      vpipe     <= {vpipe[LATENCY-3:0], in_valid};
      out_valid <= vpipe[LATENCY-2];
      for (int k = 0; k < COLS; k++) out_vec[k*ACC_W +: ACC_W] <= col_aligned[k];
    end
  end

endmodule
