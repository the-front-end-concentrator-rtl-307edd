// tb_data_system_processor: streams raw events (ts hi, ts lo, ES x 16 sample
// words) past the processor. Some events carry a pulse whose 16-channel sum
// at one sample time exceeds the threshold, others stay below it (with a
// large sum spread over two sample times, which must not fire). Every event
// over threshold must give one candidate {event number, ts hi, ts lo}; the
// others none. The candidate output is read with random backpressure.
`timescale 1ns/1ps
module tb_data_system_processor;
  localparam int NCH = 16, ES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int GAPS = 0;
  int checks = 0, failures = 0;

  logic        acq_start, s_valid, s_ready, s_last, m_valid, m_ready, m_last;
  logic [15:0] s_data, m_data;
  logic [17:0] threshold;
  logic [31:0] candidates, dropped;

  data_system_processor #(.NCH(NCH), .ADC_W(12)) dut (.*);

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
  int evn = 0, nexp = 0;

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom % 3) != 0;
    if (m_valid && m_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected candidate word %h", m_data); end
      else begin
        logic [16:0] e;
        e = expq.pop_front();
        if ({m_last, m_data} !== e) begin failures++; $display("got %h exp %h", {m_last, m_data}, e); end
      end
    end
  end

  task automatic raw_event(input bit pulse);
    logic [15:0] w [$];
    logic [31:0] ts;
    int ps;
    ts = $urandom;
    ps = $urandom % ES;
    w.push_back(ts[31:16]); w.push_back(ts[15:0]);
    for (int s = 0; s < ES; s++) begin
      for (int c = 0; c < NCH; c++) begin
        int v;
        // baseline 100 per channel -> sum 1600; pulse adds 200 on every channel
        v = 100 + (($urandom % 2 == 0) ? 1 : 0);
        if (pulse && s == ps) v += 200;
        if (!pulse && c < 8 && s == ps) v += 200;   // half the channels: sum stays below
        w.push_back({4'(c), 12'(v)});
      end
    end
    if (pulse) begin
      expq.push_back({1'b0, 16'(evn)});
      expq.push_back({1'b0, ts[31:16]});
      expq.push_back({1'b1, ts[15:0]});
      nexp++;
    end
    evn++;
    foreach (w[i]) inq.push_back({i == w.size() - 1, w[i]});
    while (inq.size() != 0) @(posedge clk);
    repeat (8) @(posedge clk);   // room for the candidate to leave
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acq_start = 0; s_valid = 0; s_data = 0; s_last = 0; m_ready = 0; s_ready = 1;
    threshold = 18'd4000;   // 16 x 300 = 4800 fires, 8 x 300 + 8 x 100 = 3200 does not
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) raw_event($urandom % 2);
    repeat (20) @(posedge clk);
    checks += 2;
    if (candidates != 32'(nexp)) begin failures++; $display("candidates %0d exp %0d", candidates, nexp); end
    if (expq.size() != 0) begin failures++; $display("candidates missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
