// tb_command_unit: presents checked command frames to the Command Unit and
// checks each effect: acquisition on (with a one-clock start pulse) and off,
// timestamp load value, trigger event numbers handed to a receiver that is
// sometimes not ready (a trigger arriving while one is still waiting must be
// counted as dropped), configuration writes, and bad frames (unknown
// identifier, wrong length) counted without effect.
`timescale 1ns/1ps
module tb_command_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        frame_valid;
  logic [3:0]  frame_id;
  logic [11:0] frame_len;
  logic [15:0] frame_data [4];
  logic        acq_on, acq_start, ts_load, trig_valid, trig_ready, cfg_we;
  logic [31:0] ts_value, cfg_wdata, bad_cmds, trig_dropped;
  logic [15:0] trig_evno;
  logic [2:0]  cfg_addr;

  command_unit #(.MAX_LEN(4)) dut (.*);

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("check failed: %s", what); end
  endfunction

  int starts = 0, loads = 0, writes = 0;
  logic [15:0] trigs [$];
  always @(posedge clk) if (rst_n) begin
    if (acq_start) starts++;
    if (ts_load) loads++;
    if (cfg_we) writes++;
    if (trig_valid && trig_ready) trigs.push_back(trig_evno);
  end

  task automatic cmd(input logic [3:0] id, input int len, input logic [15:0] d0 = 0,
                     input logic [15:0] d1 = 0, input logic [15:0] d2 = 0);
    frame_valid <= 1; frame_id <= id; frame_len <= 12'(len);
    frame_data[0] <= d0; frame_data[1] <= d1; frame_data[2] <= d2;
    @(posedge clk);
    frame_valid <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_valid = 0; frame_id = 0; frame_len = 0; trig_ready = 1;
    for (int i = 0; i < 4; i++) frame_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(!acq_on, "acq off after reset");
    cmd(4'h1, 0);
    chk(acq_on && starts == 1, "acq on");
    cmd(4'h3, 2, 16'h1234, 16'h5678);
    chk(loads == 1 && ts_value == 32'h1234_5678, "timestamp load");
    cmd(4'h5, 3, 16'h0001, 16'hABCD, 16'hEF01);
    chk(writes == 1 && cfg_addr == 3'd1 && cfg_wdata == 32'hABCD_EF01, "config write");
    cmd(4'h4, 1, 16'd77);
    chk(trigs.size() == 1 && trigs[0] == 16'd77, "trigger");
    trig_ready = 0;
    cmd(4'h4, 1, 16'd78);
    cmd(4'h4, 1, 16'd79);           // previous still waiting: dropped
    chk(trig_dropped == 1, "trigger dropped");
    trig_ready = 1;
    repeat (2) @(posedge clk);
    chk(trigs.size() == 2 && trigs[1] == 16'd78, "held trigger delivered");
    cmd(4'h4, 2, 16'd80);           // wrong length
    cmd(4'h9, 0);                   // unknown identifier
    cmd(4'h1, 1);                   // wrong length
    chk(bad_cmds == 3 && trigs.size() == 2 && starts == 1, "bad commands");
    cmd(4'h2, 0);
    chk(!acq_on, "acq off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
