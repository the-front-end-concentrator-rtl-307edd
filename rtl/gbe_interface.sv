// gbe_interface: transmit MAC of the GbE Interface.
//
// It takes a frame as a gap-free byte stream (destination MAC to the end of
// the payload, last on the final byte) and drives a byte-wide GMII-style
// transmit port (txd, tx_en), one byte per clock. In the top its clock is
// the 125 MHz GMII transmit clock, which gives 1 Gb/s:
//   7 preamble bytes 0x55, start-of-frame delimiter 0xD5, the frame bytes,
//   zero padding up to 60 bytes, the 4-byte Ethernet FCS (CRC-32, least
//   significant byte first), then IFG_BYTES idle clocks before the next frame.
// b_ready is high only while frame bytes are taken; a source that drops
// b_valid in the middle of a frame violates the protocol (checked by an
// assertion). The SFP transceiver and the serial PHY are outside.
// That the FEC sends Ethernet frames over a GbE link follows the document; this
// MAC follows IEEE 802.3 framing and is otherwise this design's own.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the reset-disable of the assertion below, which is
// not logic.
module gbe_interface
  import fec_pkg::*;
#(
  parameter int unsigned IFG_BYTES = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        b_valid,
  output logic        b_ready,
  input  logic [7:0]  b_data,
  input  logic        b_last,
  output logic [7:0]  txd,
  output logic        tx_en,
  output logic [31:0] frames_sent
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IFG} state_e;
  state_e state;

  logic [15:0] cnt;     // bytes of the frame so far, or position in pre/fcs/ifg
  logic [31:0] crc;
  logic [31:0] fcs;

  assign fcs     = ~crc;
  assign b_ready = (state == S_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      crc         <= '1;
      txd         <= '0;
      tx_en       <= 1'b0;
      frames_sent <= '0;
    end else begin
      txd   <= 8'h00;
      tx_en <= 1'b0;
      unique case (state)
        S_IDLE: if (b_valid) begin
          state <= S_PRE;
          cnt   <= '0;
        end
        S_PRE: begin
          tx_en <= 1'b1;
          txd   <= (cnt == 16'd7) ? 8'hD5 : 8'h55;
          cnt   <= cnt + 1'b1;
          if (cnt == 16'd7) begin
            state <= S_DATA;
            cnt   <= '0;
            crc   <= '1;
          end
        end
        S_DATA: begin
          tx_en <= 1'b1;
          txd   <= b_data;
          crc   <= crc32_byte(crc, b_data);
          cnt   <= cnt + 1'b1;
          if (b_last) state <= (cnt < 16'd59) ? S_PAD : S_FCS;
          if (b_last && cnt >= 16'd59) cnt <= '0;
        end
        S_PAD: begin
          tx_en <= 1'b1;
          txd   <= 8'h00;
          crc   <= crc32_byte(crc, 8'h00);
          cnt   <= cnt + 1'b1;
          if (cnt == 16'd59) begin
            state <= S_FCS;
            cnt   <= '0;
          end
        end
        S_FCS: begin
          tx_en <= 1'b1;
          txd   <= fcs[8*cnt[1:0] +: 8];
          cnt   <= cnt + 1'b1;
          if (cnt == 16'd3) begin
            state       <= S_IFG;
            cnt         <= '0;
            frames_sent <= frames_sent + 1'b1;
          end
        end
        S_IFG: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(IFG_BYTES - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) state == S_DATA |-> b_valid);
endmodule
