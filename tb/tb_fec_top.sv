// tb_fec_top: end-to-end test of the FEC firmware at its default sizes
// (16 channels, 32-sample windows, 2^27-word DDR2 ring, 9000-byte IP packets).
// The testbench plays the parts around the FPGA:
//   - an ADC card sending 16 serial lanes with a frame signal, one new sample
//     every 12 clocks; some sample windows carry a pulse on all channels;
//   - a NIM trigger source that starts the event windows;
//   - a trigger card on the DTC link: it sends command frames (configuration
//     write, timestamp sync, acquisition on/off, trigger) on the command line,
//     decodes the trigger-candidate frames coming back on the data line and
//     answers each with a TRIGGER command for that event;
//   - a DDR2 controller (behavioural model) and a GbE receiver on the 125 MHz
//     GMII clock that checks
//     preamble, FCS, IP/UDP headers and the event in the payload against the
//     samples that were sent.
// It then switches the interconnect so that events bypass DDR2 and go
// straight to Ethernet, tries a trigger while busy, a trigger for an event
// that was never stored, and a trigger with acquisition off, and reads the
// status registers. Each of these mechanisms is counted and must occur.
`timescale 1ns/1ps
module tb_fec_top;
  localparam int NCH = 16, ES = 32, NWORDS = NCH * ES;
  logic clk = 0, ext_rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0d] check failed: %s", cycle, what); end
  endfunction

  // ---------------- DUT and DDR2 model ----------------
  logic [NCH-1:0] adc_lane;
  logic           adc_frame;
  logic [1:0]     dtc_cmd_bits, dtc_data_bits;
  logic           nim_in, nim_out;
  logic           mem_req, mem_we, mem_ready, mem_rvalid;
  logic [26:0]    mem_addr;
  logic [15:0]    mem_wdata, mem_rdata;
  logic [7:0]     gmii_txd;
  logic           gmii_tx_en;
  logic           gmii_tx_clk = 0;
  logic [31:0]    gmii_frames;
  always #4 gmii_tx_clk = ~gmii_tx_clk;   // 125 MHz
  logic [4:0]     reg_rd_addr;
  logic [31:0]    reg_rd_data;

  fec_top dut (.*);
  ddr2_mem_model #(.ADDR_W(27), .LATENCY(8), .BUSY_PCT(10)) ddr (.*);

  // ---------------- ADC card ----------------
  logic [11:0] samples [$][NCH];     // every sample vector sent, by index
  int          pulse_from = -1, pulse_to = -1;
  int          bitpos = 0, cur = -1;
  logic [11:0] vec [NCH];
  always @(posedge clk) begin
    if (bitpos == 0) begin
      cur++;
      for (int c = 0; c < NCH; c++)
        vec[c] = 12'(100 + $urandom % 16 + ((cur >= pulse_from && cur <= pulse_to) ? 700 : 0));
      samples.push_back(vec);
    end
    for (int c = 0; c < NCH; c++) adc_lane[c] <= vec[c][11 - bitpos];
    adc_frame <= (bitpos < 6);
    bitpos = (bitpos == 11) ? 0 : bitpos + 1;
  end

  // ---------------- DTC command line (trigger card side) ----------------
  logic [15:0] cmdq [$];
  logic [15:0] txw = 16'h0000;
  int          txph = 0;
  int          n_cmd [16];
  always @(posedge clk) begin
    if (txph == 0) begin
      txw = (cmdq.size() != 0) ? cmdq.pop_front() : 16'h0000;
    end
    dtc_cmd_bits <= {txw[15 - 2 * txph], txw[14 - 2 * txph]};
    txph = (txph == 7) ? 0 : txph + 1;
  end

  task automatic command(input logic [3:0] id, input logic [15:0] d [$]);
    cmdq.push_back(16'hA55A);
    cmdq.push_back({id, 12'(d.size())});
    foreach (d[i]) cmdq.push_back(d[i]);
    cmdq.push_back(16'h5AA5);
    n_cmd[id]++;
  endtask

  // ---------------- DTC data line: trigger candidates ----------------
  logic [15:0] win = 0;
  int          rx_state = 0, rx_bits = 0, rx_len = 0;
  logic [15:0] rx_words [$];
  logic [15:0] cand_evno [$];
  logic [31:0] cand_ts [int];
  int          n_cand = 0, n_nim_out = 0;
  bit          answer_candidates = 1;
  always @(posedge clk) if (dut.rst_n) begin
    if (nim_out && !$past(nim_out)) n_nim_out++;
    for (int b = 1; b >= 0; b--) begin
      win = {win[14:0], dtc_data_bits[b]};
      if (rx_state == 0) begin
        if (win == 16'hA55A) begin rx_state = 1; rx_bits = 0; rx_words.delete(); end
      end else begin
        rx_bits++;
        if (rx_bits == 16) begin
          rx_bits = 0;
          rx_words.push_back(win);
          if (rx_words.size() == 1) rx_len = win[11:0];
          else if (rx_words.size() == rx_len + 2) begin
            rx_state = 0;
            chk(win == 16'h5AA5, "candidate frame trailer");
            chk(rx_words[0][15:12] == 4'h8 && rx_len == 3, "candidate frame id/length");
            n_cand++;
            cand_evno.push_back(rx_words[1]);
            cand_ts[rx_words[1]] = {rx_words[2], rx_words[3]};
          end
        end
      end
    end
  end

  // ---------------- GbE receiver ----------------
  logic [7:0]  gb [$];
  logic [15:0] gbe_events [int][$];
  int          n_gbe = 0;
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
  always @(posedge gmii_tx_clk) begin
    if (ext_rst_n && dut.tx_rst_n && gmii_tx_en) gb.push_back(gmii_txd);
    else if (ext_rst_n && gb.size() != 0) begin
      int n, plen;
      logic [31:0] f;
      logic [15:0] ev [$];
      ev.delete();
      n = gb.size();
      n_gbe++;
      chk(n >= 72, "ethernet burst length");
      for (int i = 0; i < 7; i++) chk(gb[i] == 8'h55, "preamble");
      chk(gb[7] == 8'hD5, "SFD");
      f = crc32(gb, 8, n - 4);
      chk({gb[n - 1], gb[n - 2], gb[n - 3], gb[n - 4]} == f, "FCS");
      chk({gb[20], gb[21]} == 16'h0800 && gb[22] == 8'h45 && gb[31] == 8'd17, "ethertype/ip/udp");
      chk({gb[8], gb[9], gb[10], gb[11], gb[12], gb[13]} == 48'h0250_C200_0003, "dst mac");
      chk({gb[44], gb[45]} == 16'd6006, "udp dst port");
      plen = {gb[46], gb[47]} - 8;
      for (int i = 0; i < plen / 2; i++) ev.push_back({gb[50 + 2 * i], gb[51 + 2 * i]});
      chk(ev.size() == 5 + NWORDS, "event size");
      if (ev.size() >= 2) gbe_events[ev[1]] = ev;
      gb.delete();
    end
  end

  // ---------------- event bookkeeping ----------------
  int first_sample [int];   // event number -> index of its first sample
  bit pulsed [int];
  int evn = 0;

  task automatic nim_trigger(input bit accepted, input bit pulse);
    // trigger at bit 4 of a sample: that sample is the first of the window
    while (bitpos != 4) @(posedge clk);
    if (accepted) begin
      first_sample[evn] = cur;
      pulsed[evn] = pulse;
      if (pulse) begin pulse_from = cur + 10; pulse_to = cur + 12; end
      else begin pulse_from = -1; pulse_to = -1; end
      evn++;
    end
    nim_in <= 1; repeat (2) @(posedge clk); nim_in <= 0;
  endtask

  task automatic check_event(input int e);
    logic [15:0] ev [$];
    chk(gbe_events.exists(e), $sformatf("event %0d received on GbE", e));
    if (!gbe_events.exists(e)) return;
    ev = gbe_events[e];
    if (ev.size() != 5 + NWORDS) return;
    chk(ev[0] == 16'hEB90 && ev[1] == 16'(e) && ev[4] == 16'(NWORDS), "event header");
    chk(ev[2] >= 16'h1000, "timestamp synchronised");
    if (cand_ts.exists(e)) chk({ev[2], ev[3]} == cand_ts[e], "candidate timestamp matches event");
    for (int s = 0; s < ES; s++) for (int c = 0; c < NCH; c++) begin
      logic [15:0] w;
      w = ev[5 + s * NCH + c];
      checks++;
      if (w !== {4'(c), samples[first_sample[e] + s][c]}) begin
        failures++;
        if (failures < 10) $display("event %0d sample %0d ch %0d: %h exp %h", e, s, c, w, {4'(c), samples[first_sample[e] + s][c]});
      end
    end
  endtask

  task automatic read_reg(input int a, output logic [31:0] v);
    reg_rd_addr <= 5'(a);
    repeat (3) @(posedge clk);
    v = reg_rd_data;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] v;
  int answered;
  initial begin
    nim_in = 0; reg_rd_addr = 0;
    for (int i = 0; i < 16; i++) n_cmd[i] = 0;
    repeat (5) @(posedge clk);
    ext_rst_n = 1;
    repeat (20) @(posedge clk);
    // configuration: threshold 10000 (baseline sum ~1800, pulse sum ~13000)
    command(4'h5, '{16'd1, 16'h0000, 16'd10000});
    command(4'h3, '{16'h1000, 16'h0000});          // timestamp sync
    command(4'h1, '{});                            // acquisition on
    while (cmdq.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);
    chk(dut.cfg.threshold == 18'd10000, "threshold written over the command line");

    // phase 1: events stored in DDR2, read out on accepted triggers
    for (int i = 0; i < 6; i++) begin
      nim_trigger(1, i % 2 == 0);
      if (i == 3) begin repeat (50) @(posedge clk); nim_trigger(0, 0); end   // busy
      repeat (1200) @(posedge clk);
    end
    // the trigger card accepts every candidate and one event without a pulse
    answered = 0;
    while (cand_evno.size() != 0) begin
      command(4'h4, '{cand_evno.pop_front()});
      answered++;
    end
    command(4'h4, '{16'd1});
    command(4'h4, '{16'd999});                     // never stored: a miss
    while (cmdq.size() != 0) @(posedge clk);
    for (int t = 0; t < 20000 && n_gbe < 4; t++) @(posedge clk);
    repeat (500) @(posedge clk);
    chk(answered == 3, "candidates for the three pulsed events");
    for (int e = 0; e < 6; e++) if (pulsed[e] || e == 1) check_event(e);
    chk(!gbe_events.exists(3) && !gbe_events.exists(5), "events without trigger stay in DDR2");

    // phase 2: interconnect re-routed, events go straight to GbE as well
    command(4'h5, '{16'd0, 16'h0000, 16'h00D4});
    while (cmdq.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      nim_trigger(1, 0);
      repeat (2500) @(posedge clk);
    end
    check_event(6);
    check_event(7);

    // phase 3: acquisition off, trigger ignored
    command(4'h2, '{});
    while (cmdq.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    nim_trigger(0, 0);
    repeat (1200) @(posedge clk);

    // status registers
    read_reg(8, v);  chk(v == 8, $sformatf("events recorded %0d", v));
    read_reg(9, v);  chk(v == 1, $sformatf("busy triggers %0d", v));
    read_reg(10, v); chk(v == 3, $sformatf("candidates %0d", v));
    read_reg(11, v); chk(v == 8, $sformatf("events written to DDR2 %0d", v));
    read_reg(12, v); chk(v == 4, $sformatf("events read from DDR2 %0d", v));
    read_reg(13, v); chk(v == 1, $sformatf("DDR2 misses %0d", v));
    read_reg(14, v); chk(v == 6, $sformatf("UDP frames %0d", v));
    read_reg(15, v); chk(v == 32'(n_cmd[1] + n_cmd[2] + n_cmd[3] + n_cmd[4] + n_cmd[5]), "command frames");
    read_reg(16, v); chk(v == 0, "command frame errors");
    read_reg(0, v);  chk(v == 32'h00D4, "route register");
    chk(n_gbe == 6 && gmii_frames == 6, $sformatf("GbE frames %0d, MAC count %0d", n_gbe, gmii_frames));
    chk(n_nim_out == n_cand, "NIM output pulse per candidate");

    // every mechanism must have happened
    chk(n_cmd[1] > 0 && n_cmd[2] > 0 && n_cmd[3] > 0 && n_cmd[4] > 0 && n_cmd[5] > 0, "all command types used");
    chk(n_cand > 0, "trigger candidates");
    chk(dut.acq_busy > 0, "busy trigger");
    chk(dut.misses > 0, "DDR2 miss");
    chk(gbe_events.exists(6) && gbe_events.exists(7), "DDR2 bypass route");
    $display("mechanisms: commands on=%0d off=%0d sync=%0d trig=%0d cfg=%0d, candidates=%0d, busy=%0d, misses=%0d, gbe frames=%0d",
             n_cmd[1], n_cmd[2], n_cmd[3], n_cmd[4], n_cmd[5], n_cand, dut.acq_busy, dut.misses, n_gbe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
