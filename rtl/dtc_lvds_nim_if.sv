// dtc_lvds_nim_if: the logic side of the DTC LVDS/NIM Interface.
//
// Transmit: 16-bit words from the frame builder are shifted out MSB first,
// two bits per clock (tx_bits[1] is the earlier bit), so that a 100 MHz link
// clock with double-data-rate output registers gives the 200 Mb/s of a DTC
// data line. A new word is taken every 8 clocks (w_ready pulses for one clock);
// when no word is offered the IDLE word is sent, so the line always carries
// whole words and the receiver keeps its word alignment.
// Receive: two bits per clock enter a shift register. While hunting, the SOF
// header is searched at both bit offsets a 2-bit step allows; when it is found
// the alignment is locked and one word is delivered every 8 clocks, beginning
// with that SOF. A resync pulse from the frame checker unlocks and hunts again.
// NIM: the NIM/LVDS trigger input is synchronised by two flip-flops and its
// rising edge gives a one-clock trig_in pulse; a trig_out request drives the
// NIM output high for NIM_PULSE clocks.
// The 200 Mb/s line rate and 100 MHz clock follow the link description; the
// 2-bit-per-clock split, MSB-first order, alignment method and NIM pulse
// width are this design's choices. The DDR I/O registers and LVDS/NIM level
// buffers are FPGA primitives outside this module.
module dtc_lvds_nim_if
  import fec_pkg::*;
#(
  parameter int unsigned NIM_PULSE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // transmit word stream
  input  logic        w_valid,
  output logic        w_ready,
  input  logic [15:0] w_data,
  output logic [1:0]  tx_bits,
  // receive
  input  logic [1:0]  rx_bits,
  input  logic        resync,
  output logic        r_valid,
  output logic [15:0] r_data,
  output logic        locked,
  // NIM trigger I/O
  input  logic        nim_in,
  output logic        trig_in,
  input  logic        trig_out,
  output logic        nim_out
);
  // ---------------- transmit ----------------
  logic [15:0] tx_sr;
  logic [2:0]  tx_cnt;

  assign w_ready = (tx_cnt == 3'd7);
  assign tx_bits = tx_sr[15:14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sr  <= DTC_IDLE;
      tx_cnt <= 3'd7;
    end else begin
      tx_cnt <= tx_cnt + 1'b1;
      if (tx_cnt == 3'd7) tx_sr <= w_valid ? w_data : DTC_IDLE;
      else                tx_sr <= {tx_sr[13:0], 2'b00};
    end
  end

  // ---------------- receive ----------------
  logic [14:0] rx_sr;      // previous 15 bits, bit 0 newest
  logic [16:0] rx_next;    // most recent 17 bits
  logic        phase;      // 0: word ends on rx_bits[0], 1: word ends on rx_bits[1]
  logic [2:0]  rx_cnt;

  assign rx_next = {rx_sr[14:0], rx_bits};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr   <= '0;
      phase   <= 1'b0;
      rx_cnt  <= '0;
      locked  <= 1'b0;
      r_valid <= 1'b0;
      r_data  <= '0;
    end else begin
      rx_sr   <= rx_next[14:0];
      r_valid <= 1'b0;
      if (!locked || resync) begin
        locked <= 1'b0;
        if (!resync) begin
          if (rx_next[15:0] == DTC_SOF) begin
            locked  <= 1'b1;
            phase   <= 1'b0;
            rx_cnt  <= 3'd1;
            r_valid <= 1'b1;
            r_data  <= rx_next[15:0];
          end else if (rx_next[16:1] == DTC_SOF) begin
            locked  <= 1'b1;
            phase   <= 1'b1;
            rx_cnt  <= 3'd1;
            r_valid <= 1'b1;
            r_data  <= rx_next[16:1];
          end
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
        if (rx_cnt == 3'd0) begin
          r_valid <= 1'b1;
          r_data  <= phase ? rx_next[16:1] : rx_next[15:0];
        end
      end
    end
  end

  // ---------------- NIM trigger ----------------
  logic [2:0] nim_sync;
  logic [$clog2(NIM_PULSE+1)-1:0] nim_cnt;

  assign trig_in = nim_sync[1] && !nim_sync[2];
  assign nim_out = (nim_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nim_sync <= '0;
      nim_cnt  <= '0;
    end else begin
      nim_sync <= {nim_sync[1:0], nim_in};
      if (trig_out)             nim_cnt <= NIM_PULSE[$bits(nim_cnt)-1:0];
      else if (nim_cnt != '0)   nim_cnt <= nim_cnt - 1'b1;
    end
  end
endmodule
