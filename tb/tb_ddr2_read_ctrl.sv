// tb_ddr2_read_ctrl: fills the behavioural memory model with events in their
// slots, then sends trigger requests (some back to back, so they queue) for
// stored events, for an empty slot and for an event number whose slot holds
// a different event. Each stored event must come out whole and in order,
// with last on its final word; the other two must be counted as misses and
// produce nothing. The output is read with random backpressure.
`timescale 1ns/1ps
module tb_ddr2_read_ctrl;
  localparam int AW = 14, SW = 32, NSLOT = 1 << (AW - 5);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          trig_valid, trig_ready;
  logic [15:0]   trig_evno;
  logic          mem_req, mem_we, mem_ready, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [15:0]   mem_wdata, mem_rdata;
  logic          m_valid, m_ready, m_last;
  logic [15:0]   m_data;
  logic [31:0]   events_read, misses;

  assign mem_wdata = '0;
  ddr2_read_ctrl #(.ADDR_W(AW), .SLOT_WORDS(SW), .TRIG_DEPTH(4)) dut (.*);
  ddr2_mem_model #(.ADDR_W(AW), .LATENCY(5), .BUSY_PCT(30)) mem (.*);

  logic [16:0] expq [$];
  logic [15:0] trigq [$];
  always @(posedge clk) if (rst_n) begin
    if (!trig_valid || trig_ready) begin
      if (trigq.size() != 0) begin trig_evno <= trigq.pop_front(); trig_valid <= 1; end
      else trig_valid <= 0;
    end
    m_ready <= $urandom % 3 != 0;
    if (m_valid && m_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected %h", m_data); end
      else begin
        logic [16:0] e;
        e = expq.pop_front();
        if ({m_last, m_data} !== e) begin failures++; $display("got %h exp %h", {m_last, m_data}, e); end
      end
    end
  end

  logic [15:0] stored [int][$];
  task automatic store(input int evno, input int nsamp);
    logic [15:0] w [$];
    w.push_back(16'hEB90); w.push_back(16'(evno));
    w.push_back(16'($urandom)); w.push_back(16'($urandom)); w.push_back(16'(nsamp));
    for (int i = 0; i < nsamp; i++) w.push_back(16'($urandom));
    foreach (w[i]) mem.mem[AW'((evno % NSLOT) * SW + i)] = w[i];
    stored[evno] = w;
  endtask

  task automatic trig(input int evno, input bit hit);
    if (hit) foreach (stored[evno][i]) expq.push_back({i == stored[evno].size() - 1, stored[evno][i]});
    trigq.push_back(16'(evno));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig_valid = 0; trig_evno = 0; m_ready = 0;
    for (int e = 0; e < 10; e++) store(e, 1 + $urandom % 27);
    store(NSLOT + 11, 4);   // slot 11 holds event NSLOT+11
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int e = 0; e < 10; e++) trig(e, 1);          // queued back to back
    trig(11, 0);                                      // overwritten slot
    trig(20, 0);                                      // never written
    trig(NSLOT + 11, 1);
    trig(3, 1);
    while (expq.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);
    checks += 2;
    if (events_read != 12) begin failures++; $display("events_read %0d", events_read); end
    if (misses != 2) begin failures++; $display("misses %0d", misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
