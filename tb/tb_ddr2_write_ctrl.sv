// tb_ddr2_write_ctrl: sends formatted events (marker, event number, two
// timestamp words, count, samples) with random gaps into the Write Control,
// which writes through the behavioural memory model with random stalls. The
// memory contents of every slot are then compared word by word with the
// event. One event longer than the slot must be cut at the slot size, with
// the dropped words counted.
`timescale 1ns/1ps
module tb_ddr2_write_ctrl;
  localparam int AW = 14, SW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          s_valid, s_ready, s_last;
  logic [15:0]   s_data;
  logic          mem_req, mem_we, mem_ready, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [15:0]   mem_wdata, mem_rdata;
  logic [31:0]   events_written, truncated;

  ddr2_write_ctrl #(.ADDR_W(AW), .SLOT_WORDS(SW)) dut (.*);
  ddr2_mem_model #(.ADDR_W(AW), .LATENCY(4), .BUSY_PCT(30)) mem (.*);

  logic [16:0] inq [$];
  always @(posedge clk) if (rst_n) begin
    if (!s_valid || s_ready) begin
      if (inq.size() != 0 && $urandom % 4 != 0) begin
        {s_last, s_data} <= inq.pop_front();
        s_valid <= 1;
      end else s_valid <= 0;
    end
  end

  logic [15:0] events [int][$];

  task automatic event_of(input int evno, input int nsamp);
    logic [15:0] w [$];
    w.push_back(16'hEB90); w.push_back(16'(evno));
    w.push_back(16'($urandom)); w.push_back(16'($urandom)); w.push_back(16'(nsamp));
    for (int i = 0; i < nsamp; i++) w.push_back(16'($urandom));
    events[evno] = w;
    foreach (w[i]) inq.push_back({i == w.size() - 1, w[i]});
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; s_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 20; e++) event_of(e * 7 + 3, 1 + $urandom % 26);
    event_of(1000, 40);   // 45 words into a 32-word slot: 13 dropped
    while (inq.size() != 0 || s_valid) @(posedge clk);
    repeat (20) @(posedge clk);
    foreach (events[e]) begin
      int slot;
      slot = e % (1 << (AW - 5));
      for (int i = 0; i < events[e].size() && i < SW; i++) begin
        logic [AW-1:0] a;
        a = AW'(slot * SW + i);
        checks++;
        if (!mem.mem.exists(a) || mem.mem[a] !== events[e][i]) begin
          failures++; $display("event %0d word %0d wrong", e, i);
        end
      end
    end
    checks += 2;
    if (events_written != 21) begin failures++; $display("events_written %0d", events_written); end
    if (truncated != 13) begin failures++; $display("truncated %0d", truncated); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
