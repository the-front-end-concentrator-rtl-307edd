// tb_fec_interconnect: four random word sources and four sinks with random
// backpressure. With the default route (sink d <- source d) every sink must
// receive exactly its source's words in order. After the route is changed to
// broadcast source 1 to sinks 1 and 2 (and source 2 routed nowhere), sinks 1
// and 2 must both receive all of source 1's words, and source 2 must be held.
`timescale 1ns/1ps
module tb_fec_interconnect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]        route;
  logic [3:0]        src_valid, src_ready, dst_valid, dst_ready;
  logic [3:0][16:0]  src_data, dst_data;

  fec_interconnect #(.NSRC(4), .NDST(4), .DEPTH(4)) dut (.*);

  logic [16:0] inq [4][$];
  logic [16:0] expq [4][$];
  int got [4];

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) begin
      if (!src_valid[s] || src_ready[s]) begin
        if (inq[s].size() != 0 && $urandom % 3 != 0) begin
          logic [16:0] w;
          w = inq[s].pop_front();
          src_data[s] <= w;
          src_valid[s] <= 1;
          for (int d = 0; d < 4; d++) if (route[2*d +: 2] == 2'(s)) expq[d].push_back(w);
        end else src_valid[s] <= 0;
      end
    end
    for (int d = 0; d < 4; d++) begin
      if (dst_valid[d] && dst_ready[d]) begin
        checks++;
        got[d]++;
        if (expq[d].size() == 0) begin failures++; $display("sink%0d unexpected %h", d, dst_data[d]); end
        else begin
          logic [16:0] e;
          e = expq[d].pop_front();
          if (dst_data[d] !== e) begin failures++; $display("sink%0d got %h exp %h", d, dst_data[d], e); end
        end
      end
      dst_ready[d] <= $urandom % 3 != 0;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    route = 8'hE4; src_valid = '0; src_data = '0; dst_ready = '0;
    for (int d = 0; d < 4; d++) got[d] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) for (int i = 0; i < 200; i++) inq[s].push_back({s[0], 16'($urandom)});
    while (inq[0].size() || inq[1].size() || inq[2].size() || inq[3].size() || src_valid != 0) @(posedge clk);
    repeat (30) @(posedge clk);
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (got[d] != 200 || expq[d].size() != 0) begin failures++; $display("sink%0d got %0d words", d, got[d]); end
    end
    // broadcast: sink2 <- source 1, source 2 unrouted
    route = 8'b11_01_01_00;
    for (int i = 0; i < 100; i++) inq[1].push_back({1'b0, 16'($urandom)});
    inq[2].push_back({1'b1, 16'hBEEF});
    for (int d = 0; d < 4; d++) got[d] = 0;
    while (inq[1].size() || src_valid[1]) @(posedge clk);
    repeat (30) @(posedge clk);
    checks += 3;
    if (got[1] != 100 || got[2] != 100) begin failures++; $display("broadcast %0d %0d", got[1], got[2]); end
    if (!src_valid[2] || src_ready[2]) begin failures++; $display("unrouted source not held"); end
    if (expq[1].size() != 0 || expq[2].size() != 0) begin failures++; $display("words left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
