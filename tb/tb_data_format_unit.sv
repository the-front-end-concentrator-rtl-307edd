// tb_data_format_unit: sends raw events (ts hi, ts lo, NWORDS sample words,
// last) with random gaps and takes the output with random backpressure. Each
// output event must be EVT_HDR, event number, ts hi, ts lo, NWORDS, samples,
// with last only on the final sample. The event number must count from 0
// and restart at 0 after acq_start.
`timescale 1ns/1ps
module tb_data_format_unit;
  localparam int NW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int GAPS = 1;
  int checks = 0, failures = 0;

  logic        acq_start, s_valid, s_ready, s_last, m_valid, m_ready, m_last;
  logic [15:0] s_data, m_data, event_no;

  data_format_unit #(.NWORDS(NW)) dut (.*);

  logic [16:0] expq [$];
  logic [16:0] inq [$];
  // stream driver: a word is offered until the clock edge at which ready is high
  always @(posedge clk) if (rst_n) begin
    if (!s_valid || s_ready) begin
      if (inq.size() != 0 && (GAPS == 0 || $urandom % 4 != 0)) begin
        {s_last, s_data} <= inq.pop_front();
        s_valid <= 1;
      end else s_valid <= 0;
    end
  end
  int evn = 0;

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom % 3) != 0;
    if (m_valid && m_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        logic [16:0] e;
        e = expq.pop_front();
        if ({m_last, m_data} !== e) begin failures++; $display("got %h exp %h", {m_last, m_data}, e); end
      end
    end
  end

  task automatic raw_event();
    logic [15:0] w [$];
    logic [31:0] ts;
    ts = $urandom;
    w.push_back(ts[31:16]); w.push_back(ts[15:0]);
    for (int i = 0; i < NW; i++) w.push_back(16'($urandom));
    expq.push_back({1'b0, 16'hEB90});
    expq.push_back({1'b0, 16'(evn)});
    expq.push_back({1'b0, ts[31:16]});
    expq.push_back({1'b0, ts[15:0]});
    expq.push_back({1'b0, 16'(NW)});
    for (int i = 0; i < NW; i++) expq.push_back({i == NW - 1, w[i + 2]});
    evn++;
    foreach (w[i]) inq.push_back({i == w.size() - 1, w[i]});
    while (inq.size() != 0) @(posedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acq_start = 0; s_valid = 0; s_data = 0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 20; e++) raw_event();
    while (expq.size() != 0) @(posedge clk);
    acq_start <= 1; @(posedge clk); acq_start <= 0;
    evn = 0;
    for (int e = 0; e < 10; e++) raw_event();
    while (expq.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (event_no != 16'd10) begin failures++; $display("event_no %0d", event_no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
