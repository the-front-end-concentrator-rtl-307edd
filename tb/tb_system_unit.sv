// tb_system_unit: checks that the synchronised reset is released two clocks
// after the board reset, that the timestamp counts one per clock from 0, and
// that a load makes the given value appear on the next clock and count on.
`timescale 1ns/1ps
module tb_system_unit;
  logic clk = 0, ext_rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, ts_load;
  logic [31:0] ts_value, timestamp;

  system_unit dut (.*);

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("check failed: %s", what); end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rel;
  initial begin
    ts_load = 0; ts_value = 0;
    repeat (3) @(posedge clk);
    #1 ext_rst_n = 0;
    #1 chk(!rst_n, "reset asserted");
    @(negedge clk); ext_rst_n = 1;
    rel = 0;
    while (!rst_n) begin @(posedge clk); #1; rel++; end
    chk(rel == 2, "reset released after two clocks");
    chk(timestamp == 0, "timestamp 0 at release");
    repeat (10) @(posedge clk);
    #1 chk(timestamp == 10, "counts one per clock");
    @(negedge clk); ts_load = 1; ts_value = 32'hFFFF_FFF0;
    @(negedge clk); ts_load = 0;
    chk(timestamp == 32'hFFFF_FFF0, "loaded value");
    repeat (20) @(posedge clk);
    #1 chk(timestamp == 32'h4, "counts on and wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
