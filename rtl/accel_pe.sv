// accel_pe: one processing element of the weight-stationary systolic array.
//
// The PE keeps one weight in a register (loaded with w_load and then left in
// place while inputs stream past, as a weight-stationary dataflow requires).
// Every cycle it registers the activation arriving from the left and forwards
// it to the right neighbour, and registers psum_in + act_in*w for the PE
// below. An activation slot marked invalid adds nothing, so pipeline bubbles
// pass through as zero contributions. All outputs are registered: one cycle
// from input to output. Signed 8-bit operands and a signed 32-bit partial sum
// are this implementation's choice. Synchronous active-low reset.
module accel_pe #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_load,
  input  logic signed [DATA_W-1:0] w_in,
  input  logic                     act_valid_in,
  input  logic signed [DATA_W-1:0] act_in,
  input  logic signed [ACC_W-1:0]  psum_in,
  output logic                     act_valid_out,
  output logic signed [DATA_W-1:0] act_out,
  output logic signed [ACC_W-1:0]  psum_out
);

  logic signed [DATA_W-1:0]   weight_q;
  logic signed [2*DATA_W-1:0] product;

  assign product = act_in * weight_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      weight_q      <= '0;
      act_valid_out <= 1'b0;
      act_out       <= '0;
      psum_out      <= '0;
    end else begin
      if (w_load) weight_q <= w_in;
      act_valid_out <= act_valid_in;
      act_out       <= act_in;
      psum_out      <= act_valid_in ? psum_in + ACC_W'(product) : psum_in;
    end
  end

endmodule
