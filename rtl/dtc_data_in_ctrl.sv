// dtc_data_in_ctrl: DTC Data IN Control, the frame checker of the DTC command line.
//
// It takes the aligned 16-bit words of the deserializer (one valid word per
// 8 clocks at 200 Mb/s) and looks for the frame structure of the link:
//   SOF header, {identifier[3:0], length[11:0]}, data words,
//   CRC-16 word (only when CRC_EN=1), EOF trailer.
// IDLE words between frames are skipped. Data words are held in a buffer and
// the frame is released in one clock (frame_valid with identifier, length and
// all data words) only after a correct trailer (and CRC). A frame with a wrong
// trailer, a bad CRC or a length above MAX_LEN is dropped, counted in
// frame_errors and reported by a one-clock resync pulse so that the
// deserializer can search the word alignment again.
// Frame structure follows the link description; code values, the 4/12 bit
// split and CRC-16-CCITT are this design's choices (see fec_pkg).
module dtc_data_in_ctrl
  import fec_pkg::*;
#(
  parameter int unsigned MAX_LEN = 4,    // command frames carry at most 3 data words
  parameter bit          CRC_EN  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        w_valid,
  input  logic [15:0] w_data,
  output logic        frame_valid,
  output logic [3:0]  frame_id,
  output logic [11:0] frame_len,
  output logic [15:0] frame_data [MAX_LEN],
  output logic        resync,
  output logic [31:0] frames_ok,
  output logic [31:0] frame_errors
);
  typedef enum logic [2:0] {S_HUNT, S_IDLEN, S_DATA, S_CRC, S_EOF} state_e;
  state_e state;

  logic [11:0] len, cnt;
  logic [3:0]  id;
  logic [15:0] crc;
  logic [15:0] dbuf [MAX_LEN];

  assign frame_data = dbuf;
  assign frame_id   = id;
  assign frame_len  = len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_HUNT;
      len          <= '0;
      cnt          <= '0;
      id           <= '0;
      crc          <= 16'hFFFF;
      frame_valid  <= 1'b0;
      resync       <= 1'b0;
      frames_ok    <= '0;
      frame_errors <= '0;
      for (int i = 0; i < int'(MAX_LEN); i++) dbuf[i] <= '0;
    end else begin
      frame_valid <= 1'b0;
      resync      <= 1'b0;
      if (w_valid) begin
        unique case (state)
          S_HUNT: begin
            if (w_data == DTC_SOF) begin
              state <= S_IDLEN;
              crc   <= 16'hFFFF;
            end else if (w_data != DTC_IDLE) begin
              frame_errors <= frame_errors + 1'b1;
              resync       <= 1'b1;
            end
          end
          S_IDLEN: begin
            id  <= w_data[15:12];
            len <= w_data[11:0];
            cnt <= '0;
            crc <= crc16_word(crc, w_data);
            if (w_data[11:0] > 12'(MAX_LEN)) begin
              state        <= S_HUNT;
              frame_errors <= frame_errors + 1'b1;
              resync       <= 1'b1;
            end else if (w_data[11:0] == '0) state <= CRC_EN ? S_CRC : S_EOF;
            else                             state <= S_DATA;
          end
          S_DATA: begin
            dbuf[cnt[$clog2(MAX_LEN)-1:0]] <= w_data;
            crc <= crc16_word(crc, w_data);
            cnt <= cnt + 1'b1;
            if (cnt == len - 1'b1) state <= CRC_EN ? S_CRC : S_EOF;
          end
          S_CRC: begin
            if (w_data == crc) state <= S_EOF;
            else begin
              state        <= S_HUNT;
              frame_errors <= frame_errors + 1'b1;
              resync       <= 1'b1;
            end
          end
          S_EOF: begin
            state <= S_HUNT;
            if (w_data == DTC_EOF) begin
              frame_valid <= 1'b1;
              frames_ok   <= frames_ok + 1'b1;
            end else begin
              frame_errors <= frame_errors + 1'b1;
              resync       <= 1'b1;
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

  initial assert (MAX_LEN >= 2 && MAX_LEN <= 4095);
endmodule
