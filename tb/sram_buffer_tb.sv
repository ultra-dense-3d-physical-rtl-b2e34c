// sram_buffer_tb: self-checking test of the local SRAM buffer.
// Writes every entry with a pattern that is a function of the address, reads
// them back in random order with the one-cycle read latency, checks that
// rdata holds when re is low and that a same-cycle read of a location being
// written returns the old contents.
module sram_buffer_tb;
  localparam int unsigned WIDTH = 128;
  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  sram_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] pattern(input int a, input int salt);
    return {4{32'(a * 32'h9E3779B1 + salt)}};
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
    int a;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = pattern(i, 1);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      a = $urandom_range(0, DEPTH-1);
      re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      re = 0;
      check(rdata == pattern(a, 1), $sformatf("read %0d", a));
      @(posedge clk); #1;
      check(rdata == pattern(a, 1), $sformatf("hold %0d", a));
    end
    // read-during-write returns old data, and the write lands
    we = 1; waddr = 11'd7; wdata = pattern(7, 2); re = 1; raddr = 11'd7;
    @(posedge clk); #1;
    we = 0;
    check(rdata == pattern(7, 1), "read during write returns old data");
    @(posedge clk); #1;
    re = 0;
    check(rdata == pattern(7, 2), "write after read-during-write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
