// tb_dtc_lvds_nim_if: loops the 2-bit-per-clock transmit output back to the
// receive input through a bit delay of 0..15 bits, so the receiver must find
// the word alignment itself. Checks: after SOF the received words equal the
// transmitted ones, one word every 8 clocks (200 Mb/s at 2 bits per 100 MHz
// clock), realignment after a resync pulse with a new delay, NIM input edge
// detection and the NIM output pulse width.
`timescale 1ns/1ps
module tb_dtc_lvds_nim_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        w_valid, w_ready, resync, r_valid, locked;
  logic [15:0] w_data, r_data;
  logic [1:0]  tx_bits, rx_bits;
  logic        nim_in, trig_in, trig_out, nim_out;

  dtc_lvds_nim_if #(.NIM_PULSE(4)) dut (.*);

  // bit delay line
  bit linebits [$];
  int offset;
  always @(posedge clk) begin
    linebits.push_back(tx_bits[1]);
    linebits.push_back(tx_bits[0]);
    while (linebits.size() > 2 + offset) void'(linebits.pop_front());
  end
  assign rx_bits = (linebits.size() >= 2) ? {linebits[0], linebits[1]} : 2'b00;

  // record what was put on the line
  logic [15:0] sent [$];
  always @(posedge clk) if (rst_n && w_ready) sent.push_back(w_valid ? w_data : 16'h0000);

  // compare what comes back
  bit aligned = 0;
  int words_rx = 0, last_rx_cycle = 0, cycle = 0, gap_errors = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && r_valid) begin
      if (!aligned) begin
        while (sent.size() > 0 && sent[0] != 16'hA55A) void'(sent.pop_front());
        aligned = 1;
      end else if (cycle - last_rx_cycle != 8) gap_errors++;
      last_rx_cycle = cycle;
      checks++;
      words_rx++;
      if (sent.size() == 0 || r_data !== sent[0]) begin
        failures++;
        $display("rx %h exp %h", r_data, sent.size() ? sent[0] : 16'hxxxx);
      end
      if (sent.size() > 0) void'(sent.pop_front());
    end
  end

  task automatic put(input logic [15:0] w);
    w_valid <= 1; w_data <= w;
    @(posedge clk);
    while (!w_ready) @(posedge clk);
    w_valid <= 0;
  endtask

  // NIM
  int trig_seen = 0, nim_high = 0;
  always @(posedge clk) begin
    if (rst_n && trig_in) trig_seen++;
    if (rst_n && nim_out) nim_high++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_valid = 0; w_data = 0; resync = 0; nim_in = 0; trig_out = 0;
    for (int round = 0; round < 3; round++) begin
      if (round == 0) begin
        offset = 5;
        repeat (3) @(posedge clk);
        rst_n = 1;
      end else begin
        resync <= 1; @(posedge clk); resync <= 0;
        aligned = 0;
        offset = (round == 1) ? 12 : 1;
        checks++;
        @(posedge clk);
        if (locked) begin failures++; $display("still locked after resync"); end
      end
      repeat (40) @(posedge clk);  // idle words
      put(16'hA55A);
      for (int i = 0; i < 60; i++) put(16'($urandom));
      repeat (30) @(posedge clk);
      checks++;
      if (!locked) begin failures++; $display("not locked in round %0d", round); end
    end
    checks++;
    if (gap_errors != 0) begin failures++; $display("word spacing not 8 clocks: %0d", gap_errors); end
    checks++;
    if (words_rx < 180) begin failures++; $display("too few words %0d", words_rx); end
    // NIM input: 5 pulses of various widths
    for (int p = 0; p < 5; p++) begin
      nim_in <= 1; repeat (1 + p) @(posedge clk);
      nim_in <= 0; repeat (3) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (trig_seen != 5) begin failures++; $display("trig_in pulses %0d", trig_seen); end
    // NIM output: one request -> 4 clocks high
    trig_out <= 1; @(posedge clk); trig_out <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nim_high != 4) begin failures++; $display("nim_out high %0d clocks", nim_high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
