// gbe_data_out_ctrl: Data OUT Control of the GbE Interface, the UDP sender.
//
// Event words arriving on a valid/ready stream (last marks the end of an
// event) are collected in a payload buffer. When the event ends, or when the
// buffer holds MAX_WORDS words, one Ethernet II / IPv4 / UDP frame is sent as
// a byte stream to the MAC:
//   destination MAC, source MAC, EtherType 0x0800,
//   IPv4 header (20 bytes, no options, DF set, TTL 64, protocol 17, header
//   checksum computed here, identification counting frames),
//   UDP header (ports from the configuration, UDP checksum 0 = not used),
//   payload, each 16-bit word high byte first.
// An event longer than the buffer goes out in several frames. The default
// MAX_WORDS = 4486 gives 8972 payload bytes, so that the IP packet is 9000
// bytes, the usual jumbo-frame size. The byte stream has no gaps from the first
// to the last byte, as the MAC requires. Collection and sending are not
// overlapped: the input stalls while a frame is sent.
// Clocks: words are taken on clk, bytes leave on tx_clk, the MAC's transmit
// clock (125 MHz for gigabit Ethernet). The payload buffer is a dual-clock
// memory. A frame is handed over with a toggle, req_t, synchronised into
// tx_clk; once the last byte is out, the toggle is returned, ack_t,
// synchronised into clk. The frame length and the buffer contents do not
// change while a frame is handed over, so they cross without further
// synchronisation. So do the addresses and ports, which are configuration
// and must be changed only while no frame is being sent.
// Sending UDP in frames of up to 9 KB follows the document; the header field
// values, the single buffer and the clock crossing are this design's choices.
module gbe_data_out_ctrl #(
  parameter int unsigned MAX_WORDS = 4486
) (
  input  logic        clk,        // word side
  input  logic        rst_n,
  input  logic        tx_clk,     // byte side (GMII transmit clock)
  input  logic        tx_rst_n,   // reset synchronised to tx_clk
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac,
  input  logic [31:0] src_ip,
  input  logic [31:0] dst_ip,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [15:0] s_data,
  input  logic        s_last,
  output logic        b_valid,
  input  logic        b_ready,
  output logic [7:0]  b_data,
  output logic        b_last,
  output logic [31:0] frames_sent
);
  localparam int unsigned HDR_BYTES = 42;
  localparam int unsigned WW = $clog2(MAX_WORDS + 1);
  localparam int unsigned BW = $clog2(2 * MAX_WORDS + HDR_BYTES + 1);

  typedef enum logic {S_FILL, S_WAIT} state_e;
  state_e state;              // word side
  logic   sending;            // byte side
  logic   req_t, ack_t;       // frame handshake toggles (word side, byte side)
  logic   req_s1, req_s2;     // req_t synchronised to tx_clk
  logic   ack_s1, ack_s2;     // ack_t synchronised to clk

  logic [15:0]   pbuf [MAX_WORDS];
  logic [WW-1:0] nwords;
  logic [BW-1:0] bidx, nbytes;
  logic [15:0]   ip_id, ip_len, udp_len, ip_csum;
  logic [15:0]   pword;
  logic [BW-1:0] pbyte;

  // IPv4 header checksum: one's-complement sum of the header words, inverted
  function automatic logic [15:0] ip_checksum(input logic [15:0] len, input logic [15:0] id,
                                              input logic [31:0] sip, input logic [31:0] dip);
    logic [19:0] s;
    s = 20'h4500 + 20'(len) + 20'(id) + 20'h4000 + 20'h4011 +
        20'(sip[31:16]) + 20'(sip[15:0]) + 20'(dip[31:16]) + 20'(dip[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

  assign ip_len  = 16'(20 + 8 + 2 * nwords);
  assign udp_len = 16'(8 + 2 * nwords);
  assign ip_csum = ip_checksum(ip_len, ip_id, src_ip, dst_ip);
  assign nbytes  = BW'(HDR_BYTES + 2 * nwords);
  assign pbyte   = bidx - BW'(HDR_BYTES);
  assign pword   = pbuf[pbyte[BW-1:1]];

  always_comb begin
    unique case (bidx)
      0: b_data = dst_mac[47:40];   1: b_data = dst_mac[39:32];
      2: b_data = dst_mac[31:24];   3: b_data = dst_mac[23:16];
      4: b_data = dst_mac[15:8];    5: b_data = dst_mac[7:0];
      6: b_data = src_mac[47:40];   7: b_data = src_mac[39:32];
      8: b_data = src_mac[31:24];   9: b_data = src_mac[23:16];
      10: b_data = src_mac[15:8];   11: b_data = src_mac[7:0];
      12: b_data = 8'h08;           13: b_data = 8'h00;
      14: b_data = 8'h45;           15: b_data = 8'h00;
      16: b_data = ip_len[15:8];    17: b_data = ip_len[7:0];
      18: b_data = ip_id[15:8];     19: b_data = ip_id[7:0];
      20: b_data = 8'h40;           21: b_data = 8'h00;
      22: b_data = 8'h40;           23: b_data = 8'h11;
      24: b_data = ip_csum[15:8];   25: b_data = ip_csum[7:0];
      26: b_data = src_ip[31:24];   27: b_data = src_ip[23:16];
      28: b_data = src_ip[15:8];    29: b_data = src_ip[7:0];
      30: b_data = dst_ip[31:24];   31: b_data = dst_ip[23:16];
      32: b_data = dst_ip[15:8];    33: b_data = dst_ip[7:0];
      34: b_data = src_port[15:8];  35: b_data = src_port[7:0];
      36: b_data = dst_port[15:8];  37: b_data = dst_port[7:0];
      38: b_data = udp_len[15:8];   39: b_data = udp_len[7:0];
      40: b_data = 8'h00;           41: b_data = 8'h00;
      default: b_data = pbyte[0] ? pword[7:0] : pword[15:8];
    endcase
  end

  assign s_ready = (state == S_FILL);
  assign b_valid = sending;
  assign b_last  = (bidx == nbytes - 1'b1);

  always_ff @(posedge clk) begin
    if (state == S_FILL && s_valid) pbuf[nwords[$clog2(MAX_WORDS)-1:0]] <= s_data;
  end

  // word side: fill the buffer, hand it over, wait until it has been sent
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_FILL;
      nwords      <= '0;
      req_t       <= 1'b0;
      ack_s1      <= 1'b0;
      ack_s2      <= 1'b0;
      frames_sent <= '0;
    end else begin
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      unique case (state)
        S_FILL: if (s_valid) begin
          nwords <= nwords + 1'b1;
          if (s_last || nwords == WW'(MAX_WORDS - 1)) begin
            state <= S_WAIT;
            req_t <= !req_t;
          end
        end
        S_WAIT: if (ack_s2 == req_t) begin
          state       <= S_FILL;
          nwords      <= '0;
          frames_sent <= frames_sent + 1'b1;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  // byte side: send the frame once the hand-over toggle arrives
  always_ff @(posedge tx_clk or negedge tx_rst_n) begin
    if (!tx_rst_n) begin
      sending <= 1'b0;
      bidx    <= '0;
      ip_id   <= '0;
      ack_t   <= 1'b0;
      req_s1  <= 1'b0;
      req_s2  <= 1'b0;
    end else begin
      req_s1 <= req_t;
      req_s2 <= req_s1;
      if (!sending) begin
        if (req_s2 != ack_t) begin
          sending <= 1'b1;
          bidx    <= '0;
        end
      end else if (b_ready) begin
        bidx <= bidx + 1'b1;
        if (b_last) begin
          sending <= 1'b0;
          ack_t   <= req_s2;
          ip_id   <= ip_id + 1'b1;
        end
      end
    end
  end
endmodule
