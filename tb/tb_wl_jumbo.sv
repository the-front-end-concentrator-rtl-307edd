// tb_wl_jumbo: jumbo-frame workload for the Ethernet output at its default
// size (4486-word payload buffer, 9000-byte IP packets).
// The GbE Data OUT Control and the transmit MAC are chained as in the top.
// Three events go in back to back:
//   - 4486 words, exactly one full frame;
//   - 5000 words, which must be split into 4486 + 514 words;
//   - 10 words.
// A receiver on the GMII side checks each burst:
//   - preamble, SFD and FCS (CRC-32 worked out here bit by bit);
//   - IP total length (9000 for a full frame) and header checksum (the ones'
//     complement sum of the ten header words must be 0xFFFF);
//   - UDP length;
//   - the payload words against the words sent.
// Words go in at 100 MHz; the frame is sent on the 125 MHz GMII clock.
// Rate check: the MAC sends one byte per GMII clock (1 Gb/s) with no gaps,
// so a full jumbo burst must last exactly 8 + 14 + 9000 + 4 = 9026 GMII
// clocks. The gap between bursts must be at least 12 clocks.
`timescale 1ns/1ps
module tb_wl_jumbo;
  localparam int MAXW = 4486;
  logic clk = 0, rst_n = 0, gclk = 0, grst_n = 0;
  always #5 clk = ~clk;     // 100 MHz word side
  always #4 gclk = ~gclk;   // 125 MHz GMII transmit clock
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("check failed: %s", what); end
  endtask

  logic        s_valid, s_ready, s_last;
  logic [15:0] s_data;
  logic        b_valid, b_ready, b_last, tx_en;
  logic [7:0]  b_data, txd;
  logic [31:0] udp_frames, mac_frames;

  gbe_data_out_ctrl u_out (
    .clk (clk), .rst_n (rst_n), .tx_clk (gclk), .tx_rst_n (grst_n),
    .src_mac (48'h0250_C200_0002), .dst_mac (48'h0250_C200_0003),
    .src_ip (32'h0A00_0002), .dst_ip (32'h0A00_0003),
    .src_port (16'd6006), .dst_port (16'd6006),
    .s_valid (s_valid), .s_ready (s_ready), .s_data (s_data), .s_last (s_last),
    .b_valid (b_valid), .b_ready (b_ready), .b_data (b_data), .b_last (b_last),
    .frames_sent (udp_frames)
  );
  gbe_interface u_mac (
    .clk (gclk), .rst_n (grst_n),
    .b_valid (b_valid), .b_ready (b_ready), .b_data (b_data), .b_last (b_last),
    .txd (txd), .tx_en (tx_en), .frames_sent (mac_frames)
  );

  // word source: one queue entry per word, {last, data}
  logic [16:0] srcq [$];
  logic [15:0] expf [$][$];   // expected payload of each frame
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) void'(srcq.pop_front());
  end
  always_comb begin
    s_valid = rst_n && srcq.size() != 0;
    {s_last, s_data} = s_valid ? srcq[0] : 17'h0;
  end

  task automatic send_event(input int n);
    logic [15:0] f [$];
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      srcq.push_back({i == n - 1, w});
      f.push_back(w);
      if (f.size() == MAXW || i == n - 1) begin
        expf.push_back(f);
        f.delete();
      end
    end
  endtask

  function automatic logic [31:0] crc32(input logic [7:0] d [$], input int from, input int to);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = from; i < to; i++) for (int b = 0; b < 8; b++) begin
      logic fb;
      fb = c[0] ^ d[i][b];
      c = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'hEDB8_8320;
    end
    return ~c;
  endfunction

  // GMII receiver
  logic [7:0] gb [$];
  int n_frames = 0, burst_clocks = 0, gap = 100, jumbo_bursts = 0;
  always @(posedge gclk) if (grst_n) begin
    if (tx_en) begin
      if (gb.size() == 0) chk(gap >= 12, $sformatf("inter-frame gap %0d", gap));
      gb.push_back(txd);
      burst_clocks++;
      gap = 0;
    end else begin
      gap++;
      if (gb.size() != 0) begin
        int n, iplen, nw;
        logic [31:0] f, sum;
        logic [15:0] exp_words [$];
        n = gb.size();
        chk(burst_clocks == n, "one byte per clock");
        for (int i = 0; i < 7; i++) chk(gb[i] == 8'h55, "preamble");
        chk(gb[7] == 8'hD5, "SFD");
        f = crc32(gb, 8, n - 4);
        chk({gb[n - 1], gb[n - 2], gb[n - 3], gb[n - 4]} == f, "FCS");
        iplen = {gb[24], gb[25]};
        sum = 0;
        for (int i = 0; i < 10; i++) sum += {gb[22 + 2 * i], gb[23 + 2 * i]};
        sum = (sum & 32'hFFFF) + (sum >> 16);
        sum = (sum & 32'hFFFF) + (sum >> 16);
        chk(sum == 32'hFFFF, "IP header checksum");
        nw = (iplen - 28) / 2;
        chk({gb[46], gb[47]} == 16'(iplen - 20), "UDP length");
        chk(n == 8 + 14 + iplen + 4 || (iplen < 46 && n == 8 + 60 + 4), $sformatf("burst length %0d for IP length %0d", n, iplen));
        if (expf.size() == 0) chk(0, "unexpected frame");
        else begin
          exp_words = expf.pop_front();
          chk(nw == exp_words.size(), $sformatf("payload words %0d exp %0d", nw, exp_words.size()));
          for (int i = 0; i < nw && i < exp_words.size(); i++)
            chk({gb[50 + 2 * i], gb[51 + 2 * i]} == exp_words[i], "payload word");
        end
        if (iplen == 9000) begin
          jumbo_bursts++;
          chk(burst_clocks == 9026, $sformatf("jumbo burst takes %0d clocks", burst_clocks));
        end
        n_frames++;
        burst_clocks = 0;
        gb.delete();
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    grst_n = 1;
    send_event(MAXW);
    send_event(5000);
    send_event(10);
    while (expf.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    chk(n_frames == 4, $sformatf("frames %0d", n_frames));
    chk(jumbo_bursts == 2, $sformatf("full 9000-byte packets %0d", jumbo_bursts));
    chk(udp_frames == 4 && mac_frames == 4, "frame counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
