// rram_bank_tb: self-checking test of the RRAM bank model at its full 8 MB size.
// Programs words spread over the whole address range (including the first and
// last word), reads them back and checks data and the one-cycle rvalid,
// including back-to-back reads, and that a write raises no rvalid.
module rram_bank_tb;
  localparam int unsigned WIDTH = 128;
  localparam int unsigned BYTES = 8*1024*1024;
  localparam int unsigned WORDS = BYTES*8/WIDTH;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned N     = 512;

  logic clk = 1'b0;
  logic rst_n, req, we, rvalid;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [AW-1:0] addrs [N];

  rram_bank #(.WIDTH(WIDTH), .BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] pattern(input logic [AW-1:0] a);
    return {32'(a) ^ 32'hA5A5_0000, ~32'(a), 32'(a) * 32'd2654435761, 32'(a) + 32'd17};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) addrs[i] = AW'(i * (WORDS / N) + (i % 7));
    addrs[0] = '0;
    addrs[N-1] = AW'(WORDS - 1);
    rst_n = 0; req = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      req = 1; we = 1; addr = addrs[i]; wdata = pattern(addrs[i]);
      @(posedge clk); #1;
      check(!rvalid, "no rvalid on write");
    end
    // back-to-back reads: data of request i appears in the cycle after it
    for (int i = 0; i < N; i++) begin
      req = 1; we = 0; addr = addrs[i];
      @(posedge clk); #1;
      check(rvalid && rdata == pattern(addrs[i]), $sformatf("read %0d", addrs[i]));
    end
    req = 0;
    @(posedge clk); #1;
    check(!rvalid, "rvalid drops when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
