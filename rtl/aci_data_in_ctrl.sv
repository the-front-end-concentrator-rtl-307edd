// aci_data_in_ctrl: Data IN Control of the Adapter Card Interface.
//
// While acquisition is on, a trigger pulse opens an event window of
// EVENT_SAMPLES consecutive samples of all NCH channels. The window is stored
// in a local buffer (one row of NCH x ADC_W bits per sample), then sent as a
// "raw event" word stream with valid/ready and last:
//   timestamp[31:16], timestamp[15:0]   (timestamp at the trigger)
//   EVENT_SAMPLES x NCH sample words {channel[3:0], sample[11:0]},
//   sample-major (all channels of sample 0, then sample 1, ...), last on the
//   final word.
// A trigger that arrives while a window is being recorded or sent is not
// taken; it is counted in busy_count.
// That data from the adapter card enters the firmware here follows the
// document; the triggered window, its length and the word format are this
// design's choices.
module aci_data_in_ctrl #(
  parameter int unsigned NCH           = 16,
  parameter int unsigned ADC_W         = 12,
  parameter int unsigned EVENT_SAMPLES = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acq_on,
  input  logic              trigger,
  input  logic [31:0]       timestamp,
  input  logic              sample_valid,
  input  logic [ADC_W-1:0]  sample [NCH],
  output logic              m_valid,
  input  logic              m_ready,
  output logic [15:0]       m_data,
  output logic              m_last,
  output logic [31:0]       events,
  output logic [31:0]       busy_count
);
  localparam int unsigned SW = $clog2(EVENT_SAMPLES);
  localparam int unsigned CW = $clog2(NCH);

  typedef enum logic [2:0] {S_IDLE, S_REC, S_TSH, S_TSL, S_SEND} state_e;
  state_e state;

  logic [NCH*ADC_W-1:0] win [EVENT_SAMPLES];
  logic [NCH*ADC_W-1:0] row_in, row_out;
  logic [SW:0]          wr_s;
  logic [SW-1:0]        rd_s;
  logic [CW-1:0]        rd_c;
  logic [31:0]          ts;

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) row_in[c*ADC_W +: ADC_W] = sample[c];
  end
  assign row_out = win[rd_s];

  always_ff @(posedge clk) begin
    if (state == S_REC && sample_valid) win[wr_s[SW-1:0]] <= row_in;
  end

  always_comb begin
    m_valid = 1'b0;
    m_data  = '0;
    m_last  = 1'b0;
    unique case (state)
      S_TSH:  begin m_valid = 1'b1; m_data = ts[31:16]; end
      S_TSL:  begin m_valid = 1'b1; m_data = ts[15:0];  end
      S_SEND: begin
        m_valid = 1'b1;
        m_data  = 16'({4'(rd_c), row_out[rd_c*ADC_W +: ADC_W]});
        m_last  = (rd_s == SW'(EVENT_SAMPLES - 1)) && (rd_c == CW'(NCH - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wr_s       <= '0;
      rd_s       <= '0;
      rd_c       <= '0;
      ts         <= '0;
      events     <= '0;
      busy_count <= '0;
    end else begin
      if (trigger && acq_on && state != S_IDLE) busy_count <= busy_count + 1'b1;
      unique case (state)
        S_IDLE: if (trigger && acq_on) begin
          state <= S_REC;
          ts    <= timestamp;
          wr_s  <= '0;
        end
        S_REC: if (sample_valid) begin
          wr_s <= wr_s + 1'b1;
          if (wr_s == (SW+1)'(EVENT_SAMPLES - 1)) state <= S_TSH;
        end
        S_TSH: if (m_ready) state <= S_TSL;
        S_TSL: if (m_ready) begin
          state <= S_SEND;
          rd_s  <= '0;
          rd_c  <= '0;
        end
        S_SEND: if (m_ready) begin
          if (rd_c == CW'(NCH - 1)) begin
            rd_c <= '0;
            rd_s <= rd_s + 1'b1;
            if (m_last) begin
              state  <= S_IDLE;
              events <= events + 1'b1;
            end
          end else begin
            rd_c <= rd_c + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (NCH <= 16 && ADC_W <= 12 && EVENT_SAMPLES >= 2);
endmodule
