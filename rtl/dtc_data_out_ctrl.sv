// dtc_data_out_ctrl: DTC Data OUT Control, the frame builder of the DTC data line.
//
// Words arrive as a valid/ready stream with a last flag and a 4-bit frame
// identifier. A whole frame is first collected in a buffer, because the
// identifier + length word precedes the data. Then the frame is sent as
//   SOF header, {identifier[3:0], length[11:0]}, data words,
//   CRC-16 word (only when CRC_EN=1), EOF trailer
// on a valid/ready word stream towards the serializer. The frame structure and
// the optional CRC follow the link description; the code values, the 4/12 bit
// split of the second word and CRC-16-CCITT over the identifier/length word and
// the data are this design's choices. A frame longer than MAX_LEN words is cut
// into frames of MAX_LEN words, each sent with the same identifier.
// Timing: collection takes one clock per word; sending takes len+3 (+1 with
// CRC) accepted output words. One frame is handled at a time.
module dtc_data_out_ctrl
  import fec_pkg::*;
#(
  parameter int unsigned MAX_LEN = 256,  // words per frame, at most 4095
  parameter bit          CRC_EN  = 1'b0  // the link was validated without the CRC word
) (
  input  logic        clk,
  input  logic        rst_n,
  // payload stream
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [15:0] s_data,
  input  logic        s_last,
  input  logic [3:0]  s_id,       // sampled with the first word of a frame
  // framed word stream to the serializer
  output logic        m_valid,
  input  logic        m_ready,
  output logic [15:0] m_data,
  output logic [31:0] frames_sent
);
  localparam int unsigned LW = $clog2(MAX_LEN + 1);

  typedef enum logic [2:0] {S_FILL, S_SOF, S_IDLEN, S_DATA, S_CRC, S_EOF} state_e;
  state_e state;

  logic [15:0]   buf_mem [MAX_LEN];
  logic [LW-1:0] len, idx;
  logic [3:0]    id;
  logic [15:0]   crc;

  assign s_ready = (state == S_FILL);

  always_comb begin
    m_valid = (state != S_FILL);
    unique case (state)
      S_SOF:   m_data = DTC_SOF;
      S_IDLEN: m_data = {id, 12'(len)};
      S_DATA:  m_data = buf_mem[idx[$clog2(MAX_LEN)-1:0]];
      S_CRC:   m_data = crc;
      S_EOF:   m_data = DTC_EOF;
      default: m_data = DTC_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_FILL && s_valid) buf_mem[len[$clog2(MAX_LEN)-1:0]] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_FILL;
      len         <= '0;
      idx         <= '0;
      id          <= '0;
      crc         <= 16'hFFFF;
      frames_sent <= '0;
    end else begin
      unique case (state)
        S_FILL: if (s_valid) begin
          if (len == '0) id <= s_id;
          len <= len + 1'b1;
          if (s_last || len == LW'(MAX_LEN - 1)) state <= S_SOF;
        end
        S_SOF: if (m_ready) begin
          state <= S_IDLEN;
          crc   <= 16'hFFFF;
        end
        S_IDLEN: if (m_ready) begin
          crc   <= crc16_word(crc, m_data);
          idx   <= '0;
          state <= (len == '0) ? (CRC_EN ? S_CRC : S_EOF) : S_DATA;
        end
        S_DATA: if (m_ready) begin
          crc <= crc16_word(crc, m_data);
          idx <= idx + 1'b1;
          if (idx == len - 1'b1) state <= CRC_EN ? S_CRC : S_EOF;
        end
        S_CRC: if (m_ready) state <= S_EOF;
        S_EOF: if (m_ready) begin
          state       <= S_FILL;
          len         <= '0;
          frames_sent <= frames_sent + 1'b1;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  initial assert (MAX_LEN >= 1 && MAX_LEN <= 4095);
endmodule
