// tb_wl_dtc_prbs: link workload for the DTC data line.
// A PRBS-31 word stream (x^31 + x^28 + 1, 16 bits per word) is cut into
// frames of 256 words. The frames are sent through the link, with no CRC word
// as in the link's validation test:
//   DTC Data OUT Control -> transmitter -> wire (1-bit offset) -> receiver
//   -> DTC Data IN Control.
// The frame builder runs at its default size. The checker is given room for
// 256-word frames, since in the top it only sees short command frames.
// Checks:
//   - every frame arrives once, with its identifier and length, and each word
//     equals the PRBS word sent;
//   - no framing error occurs;
//   - on the wire a frame of L data words takes (L + 3) words x 8 clocks
//     (200 Mb/s at 100 MHz), so the received words of a frame are exactly
//     8 clocks apart;
//   - the frame builder first takes in all L words, one per clock, and then
//     sends the frame, so frames arrive every L + (L + 3) x 8 clocks.
// The number of bits delivered without error is printed at the end.
`timescale 1ns/1ps
module tb_wl_dtc_prbs;
  localparam int L = 256, NFRAMES = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("[%0d] check failed: %s", cycle, what); end
  endtask

  logic        s_valid, s_ready, s_last;
  logic [15:0] s_data;
  logic        w_valid, w_ready;
  logic [15:0] w_data;
  logic [1:0]  tx_bits, rx_bits;
  logic        resync, r_valid, locked, trig_in, nim_out;
  logic [15:0] r_data;
  logic        frame_valid;
  logic [3:0]  frame_id;
  logic [11:0] frame_len;
  logic [15:0] frame_data [L];
  logic [31:0] frames_sent, frames_ok, frame_errors;

  dtc_data_out_ctrl u_out (
    .clk (clk), .rst_n (rst_n),
    .s_valid (s_valid), .s_ready (s_ready), .s_data (s_data), .s_last (s_last), .s_id (4'h8),
    .m_valid (w_valid), .m_ready (w_ready), .m_data (w_data), .frames_sent (frames_sent)
  );
  dtc_lvds_nim_if u_link (
    .clk (clk), .rst_n (rst_n),
    .w_valid (w_valid), .w_ready (w_ready), .w_data (w_data), .tx_bits (tx_bits),
    .rx_bits (rx_bits), .resync (resync), .r_valid (r_valid), .r_data (r_data), .locked (locked),
    .nim_in (1'b0), .trig_in (trig_in), .trig_out (1'b0), .nim_out (nim_out)
  );
  dtc_data_in_ctrl #(.MAX_LEN(L)) u_in (
    .clk (clk), .rst_n (rst_n),
    .w_valid (r_valid), .w_data (r_data),
    .frame_valid (frame_valid), .frame_id (frame_id), .frame_len (frame_len), .frame_data (frame_data),
    .resync (resync), .frames_ok (frames_ok), .frame_errors (frame_errors)
  );

  // wire: the serial bit stream delayed by one bit, so words straddle clocks
  logic held;
  always @(posedge clk) held <= tx_bits[0];
  assign rx_bits = {held, tx_bits[1]};

  // PRBS-31 source
  logic [30:0] lfsr = 31'h7FFF_FFFF;
  logic [15:0] sent [$][$];
  logic [16:0] srcq [$];
  function automatic logic [15:0] prbs_word();
    logic [15:0] w;
    for (int b = 0; b < 16; b++) begin
      logic nb;
      nb = lfsr[30] ^ lfsr[27];
      lfsr = {lfsr[29:0], nb};
      w = {w[14:0], nb};
    end
    return w;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) void'(srcq.pop_front());
  end
  always_comb begin
    s_valid = rst_n && srcq.size() != 0;
    {s_last, s_data} = s_valid ? srcq[0] : 17'h0;
  end

  // receiver side: word spacing inside a frame, frame contents
  int last_r = 0, n_rx_frames = 0, last_frame = 0;
  logic in_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (r_valid) begin
      if (in_frame) chk(cycle - last_r == 8, $sformatf("word spacing %0d", cycle - last_r));
      in_frame = (r_data == 16'hA55A) ? 1'b1 : (r_data == 16'h5AA5) ? 1'b0 : in_frame;
      last_r = cycle;
    end
    if (frame_valid) begin
      logic [15:0] e [$];
      if (sent.size() == 0) chk(0, "unexpected frame");
      else begin
        e = sent.pop_front();
        chk(frame_id == 4'h8 && 32'(frame_len) == e.size(), "frame identifier and length");
        for (int i = 0; i < e.size(); i++) chk(frame_data[i] == e[i], $sformatf("PRBS word %0d", i));
      end
      if (n_rx_frames > 0) chk(cycle - last_frame == L + (L + 3) * 8, $sformatf("frame period %0d", cycle - last_frame));
      last_frame = cycle;
      n_rx_frames++;
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
    for (int f = 0; f < NFRAMES; f++) begin
      logic [15:0] fr [$];
      fr.delete();
      for (int i = 0; i < L; i++) begin
        logic [15:0] w;
        w = prbs_word();
        fr.push_back(w);
        srcq.push_back({i == L - 1, w});
      end
      sent.push_back(fr);
    end
    while (sent.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);
    chk(n_rx_frames == NFRAMES && frames_ok == NFRAMES, $sformatf("frames received %0d", n_rx_frames));
    chk(frame_errors == 0, "no framing errors");
    chk(frames_sent == NFRAMES, "frames sent");
    $display("PRBS-31: %0d frames, %0d data bits delivered without error", n_rx_frames, n_rx_frames * L * 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
