// data_format_unit: Data Format Unit of the Process Unit.
//
// It turns each raw event from the adapter-card interface (timestamp high,
// timestamp low, then sample words, last on the final word) into the event
// format kept in the DDR2 buffer:
//   EVT_HDR marker, event number, timestamp[31:16], timestamp[15:0],
//   number of sample words, sample words ... (last on the final word).
// The event number counts raw events from the start of acquisition
// (acq_start clears it). The sample-word count is the constant NWORDS of the
// configured window. Words flow with valid/ready; the unit adds one clock of
// latency per word and three inserted words per event.
// That data are formatted before being stored in DDR2 follows the document;
// the format itself is this design's choice (see fec_pkg).
module data_format_unit
  import fec_pkg::*;
#(
  parameter int unsigned NWORDS = 512   // sample words per event (EVENT_SAMPLES x channels)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acq_start,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [15:0] s_data,
  input  logic        s_last,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [15:0] m_data,
  output logic        m_last,
  output logic [15:0] event_no
);
  typedef enum logic [2:0] {S_HDR, S_EVNO, S_TSH, S_TSL, S_CNT, S_DATA} state_e;
  state_e state;

  // S_HDR waits for the first raw word (ts hi) and sends the marker, S_EVNO
  // sends the event number while ts hi is still held, S_TSH consumes ts hi,
  // S_TSL consumes ts lo, S_CNT inserts the word count, S_DATA passes samples.
  always_comb begin
    s_ready = 1'b0;
    m_valid = 1'b0;
    m_data  = s_data;
    m_last  = 1'b0;
    unique case (state)
      S_HDR:  begin m_valid = s_valid; m_data = EVT_HDR; end
      S_EVNO: begin m_valid = 1'b1;    m_data = event_no; end
      S_TSH:  begin m_valid = s_valid; s_ready = m_ready; end
      S_TSL:  begin m_valid = s_valid; s_ready = m_ready; end
      S_CNT:  begin m_valid = 1'b1;    m_data = 16'(NWORDS); end
      S_DATA: begin m_valid = s_valid; s_ready = m_ready; m_last = s_last; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_HDR;
      event_no <= '0;
    end else begin
      if (acq_start && state == S_HDR) event_no <= '0;
      if (m_valid && m_ready) begin
        unique case (state)
          S_HDR:  state <= S_EVNO;
          S_EVNO: state <= S_TSH;
          S_TSH:  state <= S_TSL;
          S_TSL:  state <= S_CNT;
          S_CNT:  state <= S_DATA;
          S_DATA: if (s_last) begin
            state    <= S_HDR;
            event_no <= event_no + 1'b1;
          end
          default: state <= S_HDR;
        endcase
      end
    end
  end
endmodule
