// accel_pe_tb: self-checking test of one weight-stationary PE.
// Loads random weights, then drives random activations and partial sums with
// random valid flags and checks, one cycle later, the forwarded activation and
// psum_out = psum_in + act*w (or psum_in for an invalid slot), computed here
// from the driven values. Also checks that the weight stays put while w_load
// is low and that reset clears the outputs.
module accel_pe_tb;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ACC_W  = 32;

  logic clk = 1'b0;
  logic rst_n;
  logic w_load, act_valid_in, act_valid_out;
  logic signed [DATA_W-1:0] w_in, act_in, act_out;
  logic signed [ACC_W-1:0]  psum_in, psum_out;
  int checks = 0, failures = 0;

  accel_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic signed [DATA_W-1:0] w_model;
    logic signed [ACC_W-1:0]  exp_psum;
    logic signed [DATA_W-1:0] exp_act;
    logic                     exp_vld;
    rst_n = 1'b0; w_load = 1'b0; w_in = '0; act_valid_in = 1'b0; act_in = '0; psum_in = '0;
    @(posedge clk); #1;
    check(psum_out == 0 && act_out == 0 && !act_valid_out, "reset");
    rst_n = 1'b1;
    w_model = '0;
    for (int n = 0; n < 2000; n++) begin
      // occasionally load a new weight
      w_load = ($urandom_range(0, 7) == 0);
      w_in   = DATA_W'($urandom);
      act_valid_in = ($urandom_range(0, 3) != 0);
      act_in  = DATA_W'($urandom);
      if (n % 5 == 0) act_in = (n % 10 == 0) ? -8'sd128 : 8'sd127;
      psum_in = ACC_W'($urandom);
      exp_psum = act_valid_in ? psum_in + ACC_W'(32'(act_in) * 32'(w_model)) : psum_in;
      exp_act  = act_in;
      exp_vld  = act_valid_in;
      @(posedge clk); #1;
      if (w_load) w_model = w_in;
      check(psum_out == exp_psum, $sformatf("psum n=%0d got %0d exp %0d", n, psum_out, exp_psum));
      check(act_out == exp_act && act_valid_out == exp_vld, $sformatf("act n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
