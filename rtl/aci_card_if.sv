// aci_card_if: Card Interface of the Adapter Card Interface, for the CERN ADC card.
//
// The CERN ADC adapter card carries two 8-channel 12-bit ADCs, giving 16
// channels. This block receives one serial lane per channel plus a frame
// signal shared by all lanes. Each clock brings one bit per lane (MSB first);
// a rising edge of the frame signal marks the first bit of a new sample. After
// the 12th bit the 16 sample words are presented together on sample with a
// one-clock sample_valid; a frame edge that comes early or late is counted in
// frame_errors and restarts the word.
// Channel count and 12-bit resolution follow the document. The serial-lane
// format with a frame signal, one bit per clock and MSB-first order are this
// design's choices (the input DDR registers and LVDS buffers are outside).
module aci_card_if #(
  parameter int unsigned NCH   = 16,
  parameter int unsigned ADC_W = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCH-1:0]       lane,
  input  logic                 frame,
  output logic                 sample_valid,
  output logic [ADC_W-1:0]     sample [NCH],
  output logic [31:0]          frame_errors
);
  logic [ADC_W-1:0]           sr [NCH];
  logic [$clog2(ADC_W+1)-1:0] bitcnt;
  logic                       frame_d;
  logic                       start;

  assign start = frame && !frame_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_d      <= 1'b0;
      bitcnt       <= '0;
      sample_valid <= 1'b0;
      frame_errors <= '0;
      for (int c = 0; c < int'(NCH); c++) begin
        sr[c]     <= '0;
        sample[c] <= '0;
      end
    end else begin
      frame_d      <= frame;
      sample_valid <= 1'b0;
      for (int c = 0; c < int'(NCH); c++) sr[c] <= {sr[c][ADC_W-2:0], lane[c]};
      if (start) begin
        if (bitcnt != '0) frame_errors <= frame_errors + 1'b1;
        bitcnt <= 1;
      end else if (bitcnt != '0) begin
        if (bitcnt == ($bits(bitcnt))'(ADC_W - 1)) begin
          bitcnt       <= '0;
          sample_valid <= 1'b1;
          for (int c = 0; c < int'(NCH); c++) sample[c] <= {sr[c][ADC_W-2:0], lane[c]};
        end else begin
          bitcnt <= bitcnt + 1'b1;
        end
      end
    end
  end
endmodule
