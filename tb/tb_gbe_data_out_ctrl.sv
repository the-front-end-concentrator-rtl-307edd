// tb_gbe_data_out_ctrl: sends events of random length (and one longer than the
// payload buffer, which must be split into several frames) into the UDP
// sender and takes its byte stream with random backpressure. Every frame is
// parsed here: MAC addresses, EtherType, each IPv4 field, the header
// checksum (the one's-complement sum over the whole header must be 0xFFFF),
// UDP ports and length, and the payload bytes against the words sent.
// Words go in on a 100 MHz clock and bytes come out on a separate 125 MHz
// clock, so the frame hand-over between the two clock domains is exercised.
`timescale 1ns/1ps
module tb_gbe_data_out_ctrl;
  localparam int MAXW = 20;
  logic clk = 0, rst_n = 0, tx_clk = 0, tx_rst_n = 0;
  always #5 clk = ~clk;
  always #4 tx_clk = ~tx_clk;   // byte side on its own, faster clock
  int checks = 0, failures = 0;

  logic [47:0] src_mac = 48'h02_50_C2_00_00_02, dst_mac = 48'hA0_B1_C2_D3_E4_F5;
  logic [31:0] src_ip = 32'h0A00_0002, dst_ip = 32'hC0A8_0164;
  logic [15:0] src_port = 16'd6006, dst_port = 16'd6007;
  logic        s_valid, s_ready, s_last, b_valid, b_ready, b_last;
  logic [15:0] s_data;
  logic [7:0]  b_data;
  logic [31:0] frames_sent;

  gbe_data_out_ctrl #(.MAX_WORDS(MAXW)) dut (.*);

  logic [16:0] inq [$];
  logic [15:0] payq [$][$];   // expected payload of each frame
  always @(posedge clk) if (rst_n) begin
    if (!s_valid || s_ready) begin
      if (inq.size() != 0 && $urandom % 4 != 0) begin
        {s_last, s_data} <= inq.pop_front();
        s_valid <= 1;
      end else s_valid <= 0;
    end
  end

  task automatic send_event(input int n);
    logic [15:0] seg [$];
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      inq.push_back({i == n - 1, w});
      seg.push_back(w);
      if (seg.size() == MAXW || i == n - 1) begin payq.push_back(seg); seg.delete(); end
    end
  endtask

  function automatic void chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("frame check failed: %s", what); end
  endfunction

  logic [7:0] fr [$];
  int nframes = 0, last_id = -1;
  always @(posedge tx_clk) if (tx_rst_n) begin
    b_ready <= $urandom % 5 != 0;
    if (b_valid && b_ready) begin
      fr.push_back(b_data);
      if (b_last) begin
        logic [15:0] pay [$];
        int plen;
        logic [31:0] sum;
        nframes++;
        chk(fr.size() >= 42, "length");
        chk({fr[0], fr[1], fr[2], fr[3], fr[4], fr[5]} == dst_mac, "dst mac");
        chk({fr[6], fr[7], fr[8], fr[9], fr[10], fr[11]} == src_mac, "src mac");
        chk({fr[12], fr[13]} == 16'h0800, "ethertype");
        chk(fr[14] == 8'h45 && fr[23] == 8'd17 && fr[22] == 8'd64, "ip version/proto/ttl");
        plen = fr.size() - 42;
        chk({fr[16], fr[17]} == 16'(plen + 28), "ip length");
        chk({fr[26], fr[27], fr[28], fr[29]} == src_ip && {fr[30], fr[31], fr[32], fr[33]} == dst_ip, "ip addr");
        sum = 0;
        for (int i = 14; i < 34; i += 2) sum += {fr[i], fr[i + 1]};
        while (sum > 32'hFFFF) sum = (sum & 32'hFFFF) + (sum >> 16);
        chk(sum == 32'hFFFF, "ip checksum");
        chk(int'({fr[18], fr[19]}) == last_id + 1, "ip identification");
        last_id = {fr[18], fr[19]};
        chk({fr[34], fr[35]} == src_port && {fr[36], fr[37]} == dst_port, "udp ports");
        chk({fr[38], fr[39]} == 16'(plen + 8), "udp length");
        if (payq.size() == 0) chk(0, "unexpected frame");
        else begin
          pay = payq.pop_front();
          chk(plen == 2 * pay.size(), "payload length");
          for (int i = 0; i < pay.size() && 42 + 2 * i + 1 < fr.size(); i++)
            chk({fr[42 + 2 * i], fr[43 + 2 * i]} == pay[i], "payload word");
        end
        fr.delete();
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; s_last = 0; b_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; tx_rst_n = 1;
    for (int e = 0; e < 15; e++) send_event(1 + $urandom % MAXW);
    send_event(3 * MAXW + 5);   // split into four frames
    while (inq.size() != 0 || payq.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(frames_sent == 32'(nframes) && nframes == 19, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
