// fec_pkg: types, constants and CRC helpers shared by the FEC firmware blocks.
//
// The DTC link carries 16-bit words. A frame is a start-of-frame header, an
// identifier + frame-length word, a variable number of data words, an optional
// CRC word and an end-of-frame trailer; that structure follows the link
// description. The code values of header, trailer and identifiers, the
// identifier/length split of the second word (4-bit identifier, 12-bit length)
// and the CRC polynomial (CRC-16-CCITT) are this design's choices.
// The configuration register map and the event format stored in the DDR2
// buffer are also this design's choices.
package fec_pkg;


  // DTC frame words
  localparam logic [15:0] DTC_SOF  = 16'hA55A;  // start-of-frame header
  localparam logic [15:0] DTC_EOF  = 16'h5AA5;  // end-of-frame trailer
  localparam logic [15:0] DTC_IDLE = 16'h0000;  // sent between frames

  // Command-line frame identifiers
  typedef enum logic [3:0] {
    CMD_NOP       = 4'h0,
    CMD_ACQ_ON    = 4'h1,   // start acquisition, clears the event counter
    CMD_ACQ_OFF   = 4'h2,   // stop acquisition
    CMD_TS_SYNC   = 4'h3,   // data: timestamp[31:16], timestamp[15:0]
    CMD_TRIGGER   = 4'h4,   // data: event number of the accepted event
    CMD_CFG_WRITE = 4'h5    // data: register address, value[31:16], value[15:0]
  } cmd_id_e;

  // Data-line frame identifier for trigger candidates
  localparam logic [3:0] ID_TRIG_CAND = 4'h8;

  // Event format in the DDR2 buffer
  localparam logic [15:0] EVT_HDR = 16'hEB90;
  localparam int unsigned EVT_HDR_WORDS = 5;  // marker, event no, ts hi, ts lo, sample-word count

  // Configuration registers (32 bit each)
  localparam int unsigned CFG_NREGS = 8;
  localparam logic [2:0] REG_ROUTE     = 3'd0;  // [7:0] source of each interconnect sink, 2 bits per sink
  localparam logic [2:0] REG_THRESHOLD = 3'd1;  // [17:0] trigger-candidate threshold on the channel sum
  localparam logic [2:0] REG_SRC_IP    = 3'd2;
  localparam logic [2:0] REG_DST_IP    = 3'd3;
  localparam logic [2:0] REG_PORTS     = 3'd4;  // {src_port, dst_port}
  localparam logic [2:0] REG_SRC_MAC_H = 3'd5;  // src_mac[47:16]
  localparam logic [2:0] REG_MAC_MIX   = 3'd6;  // {src_mac[15:0], dst_mac[47:32]}
  localparam logic [2:0] REG_DST_MAC_L = 3'd7;  // dst_mac[31:0]

  typedef struct packed {
    logic [7:0]  route;
    logic [17:0] threshold;
    logic [47:0] src_mac;
    logic [47:0] dst_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
  } cfg_t;

  // CRC-16-CCITT (x^16+x^12+x^5+1), 16 data bits per step, MSB first
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // Ethernet CRC-32 (reflected, polynomial 0xEDB88320), one byte per step, LSB first
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB88320;
      else             c = c >> 1;
    end
    return c;
  endfunction

endpackage
