// tb_dtc_data_out_ctrl: checks the DTC frame builder. Random frames (identifier,
// 1..12 words) go in; the word stream coming out, taken with random
// backpressure, is compared with SOF, {id,len}, data, [CRC], EOF worked out
// here. Two instances: one without CRC and MAX_LEN 8 (frames of 9..12 words
// are split), one with CRC. The CRC reference is a bit-serial LFSR written
// independently of the design's function.
`timescale 1ns/1ps
module tb_dtc_data_out_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        s_valid [2];
  logic        s_ready [2];
  logic [15:0] s_data [2];
  logic        s_last [2];
  logic [3:0]  s_id [2];
  logic        m_valid [2], m_ready [2];
  logic [15:0] m_data [2];
  logic [31:0] frames [2];

  dtc_data_out_ctrl #(.MAX_LEN(8), .CRC_EN(1'b0)) dut0 (
    .clk, .rst_n, .s_valid(s_valid[0]), .s_ready(s_ready[0]), .s_data(s_data[0]),
    .s_last(s_last[0]), .s_id(s_id[0]), .m_valid(m_valid[0]), .m_ready(m_ready[0]),
    .m_data(m_data[0]), .frames_sent(frames[0]));
  dtc_data_out_ctrl #(.MAX_LEN(16), .CRC_EN(1'b1)) dut1 (
    .clk, .rst_n, .s_valid(s_valid[1]), .s_ready(s_ready[1]), .s_data(s_data[1]),
    .s_last(s_last[1]), .s_id(s_id[1]), .m_valid(m_valid[1]), .m_ready(m_ready[1]),
    .m_data(m_data[1]), .frames_sent(frames[1]));

  function automatic logic [15:0] ref_crc(input logic [15:0] words [$]);
    logic [15:0] r = 16'hFFFF;
    foreach (words[w]) for (int b = 15; b >= 0; b--) begin
      logic fb = r[15] ^ words[w][b];
      r = r << 1;
      if (fb) begin r[0] ^= 1'b1; r[5] ^= 1'b1; r[12] ^= 1'b1; end
    end
    return r;
  endfunction

  logic [15:0] expq [2][$];
  int nframes [2];

  task automatic send_frame(input int k, input int len, input logic [3:0] id);
    logic [15:0] d [$];
    for (int i = 0; i < len; i++) d.push_back(16'($urandom));
    // expected output, split at MAX_LEN
    begin
      int maxl = (k == 0) ? 8 : 16;
      int pos = 0;
      while (pos < len) begin
        int n = (len - pos > maxl) ? maxl : len - pos;
        logic [15:0] seg [$];
        seg.push_back({id, 12'(n)});
        for (int i = 0; i < n; i++) seg.push_back(d[pos + i]);
        expq[k].push_back(16'hA55A);
        foreach (seg[i]) expq[k].push_back(seg[i]);
        if (k == 1) expq[k].push_back(ref_crc(seg));
        expq[k].push_back(16'h5AA5);
        nframes[k]++;
        pos += n;
      end
    end
    for (int i = 0; i < len; i++) begin
      s_valid[k] <= 1; s_data[k] <= d[i]; s_last[k] <= (i == len - 1); s_id[k] <= id;
      @(posedge clk);
      while (!s_ready[k]) @(posedge clk);
    end
    s_valid[k] <= 0;
  endtask

  // output checkers
  for (genvar k = 0; k < 2; k++) begin : g_chk
    always @(posedge clk) if (rst_n) begin
      m_ready[k] <= ($urandom % 4) != 0;
      if (m_valid[k] && m_ready[k]) begin
        checks++;
        if (expq[k].size() == 0) begin failures++; $display("k%0d unexpected word %h", k, m_data[k]); end
        else begin
          logic [15:0] e;
          e = expq[k].pop_front();
          if (m_data[k] !== e) begin failures++; $display("k%0d got %h exp %h", k, m_data[k], e); end
        end
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
    for (int k = 0; k < 2; k++) begin s_valid[k] = 0; s_data[k] = 0; s_last[k] = 0; s_id[k] = 0; m_ready[k] = 0; nframes[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < 40; f++) send_frame(0, 1 + $urandom % 12, 4'($urandom));
      for (int f = 0; f < 40; f++) send_frame(1, 1 + $urandom % 12, 4'($urandom));
    join
    while (expq[0].size() != 0 || expq[1].size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (frames[k] != 32'(nframes[k])) begin failures++; $display("k%0d frame count %0d exp %0d", k, frames[k], nframes[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
