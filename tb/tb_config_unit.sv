// tb_config_unit: checks the reset values of the configuration registers as
// seen in the cfg structure and through the read port, writes every register
// and reads it back both ways, and checks that status words appear at
// addresses 8 and up, one clock behind their inputs.
`timescale 1ns/1ps
module tb_config_unit;
  import fec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [2:0]  waddr;
  logic [31:0] wdata, rd_data;
  cfg_t        cfg;
  logic [31:0] status [4];
  logic [4:0]  rd_addr;

  config_unit #(.NSTAT(4)) dut (.*);

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("check failed: %s", what); end
  endfunction

  task automatic rd(input int a, output logic [31:0] v);
    rd_addr <= 5'(a);
    @(posedge clk); @(posedge clk); #1;
    v = rd_data;
  endtask

  logic [31:0] v, vals [8];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; rd_addr = 0;
    for (int i = 0; i < 4; i++) status[i] = 32'h100 * i + 7;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(cfg.route == 8'hE4, "reset route");
    chk(cfg.src_ip == 32'h0A00_0002 && cfg.dst_ip == 32'h0A00_0003, "reset ip");
    chk(cfg.src_port == 16'd6006 && cfg.dst_port == 16'd6006, "reset ports");
    chk(cfg.src_mac == 48'h0250_C200_0002 && cfg.dst_mac == 48'h0250_C200_0003, "reset mac");
    rd(1, v); chk(v == 32'd20000, "reset threshold via read port");
    for (int a = 0; a < 8; a++) begin
      vals[a] = $urandom;
      @(negedge clk); we = 1; waddr = 3'(a); wdata = vals[a];
      @(negedge clk); we = 0;
    end
    for (int a = 0; a < 8; a++) begin rd(a, v); chk(v == vals[a], "read back"); end
    chk(cfg.route == vals[0][7:0] && cfg.threshold == vals[1][17:0], "cfg route/threshold");
    chk(cfg.src_ip == vals[2] && cfg.dst_ip == vals[3], "cfg ip");
    chk(cfg.src_port == vals[4][31:16] && cfg.dst_port == vals[4][15:0], "cfg ports");
    chk(cfg.src_mac == {vals[5], vals[6][31:16]} && cfg.dst_mac == {vals[6][15:0], vals[7]}, "cfg mac");
    for (int s = 0; s < 4; s++) begin rd(8 + s, v); chk(v == 32'h100 * s + 7, "status"); end
    rd(20, v); chk(v == 0, "unused address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
