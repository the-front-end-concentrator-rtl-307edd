// data_system_processor: Data/System Processor of the Process Unit.
//
// It watches the raw-event stream entering the Data Format Unit (it never
// stalls it) and looks for a pulse: for each sample time the NCH channel
// samples are added, and when any sum exceeds the configured threshold the
// event becomes a trigger candidate. At the end of such an event a three-word
// candidate {event number, timestamp[31:16], timestamp[15:0]} is sent, with
// last on the third word, towards the DTC data line. The event numbering
// matches the Data Format Unit (cleared by acq_start). If the previous
// candidate has not left yet, the new one is dropped and counted.
// That the Process Unit derives trigger candidates from the data and sends
// them over the DTC link follows the document; the channel-sum threshold
// algorithm is this design's choice (the document does not give one).
module data_system_processor #(
  parameter int unsigned NCH   = 16,
  parameter int unsigned ADC_W = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acq_start,
  input  logic [17:0] threshold,
  // snooped raw-event stream (a word moves when valid and ready are high)
  input  logic        s_valid,
  input  logic        s_ready,
  input  logic [15:0] s_data,
  input  logic        s_last,
  // trigger candidates
  output logic        m_valid,
  input  logic        m_ready,
  output logic [15:0] m_data,
  output logic        m_last,
  output logic [31:0] candidates,
  output logic [31:0] dropped
);
  localparam int unsigned CW = $clog2(NCH);

  logic [1:0]      hdr_pos;     // 0: ts hi next, 1: ts lo next, 2: samples
  logic [31:0]     ts;
  logic [15:0]     evno;
  logic [CW-1:0]   ch;
  logic [17:0]     sum;
  logic [17:0]     sum_next;
  logic            hit;
  // candidate output
  logic [1:0]      out_pos;
  logic            out_busy;
  logic [15:0]     c_evno;
  logic [31:0]     c_ts;
  logic            fire;

  assign sum_next = sum + 18'(s_data[ADC_W-1:0]);

  always_comb begin
    m_valid = out_busy;
    m_last  = (out_pos == 2'd2);
    unique case (out_pos)
      2'd0:    m_data = c_evno;
      2'd1:    m_data = c_ts[31:16];
      default: m_data = c_ts[15:0];
    endcase
  end

  // candidate decision on the last word of an event
  assign fire = s_valid && s_ready && s_last && hdr_pos == 2'd2 &&
                (hit || (ch == CW'(NCH - 1) && sum_next > threshold));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_pos    <= '0;
      ts         <= '0;
      evno       <= '0;
      ch         <= '0;
      sum        <= '0;
      hit        <= 1'b0;
      out_pos    <= '0;
      out_busy   <= 1'b0;
      c_evno     <= '0;
      c_ts       <= '0;
      candidates <= '0;
      dropped    <= '0;
    end else begin
      if (acq_start && hdr_pos == 2'd0) evno <= '0;
      if (s_valid && s_ready) begin
        unique case (hdr_pos)
          2'd0: begin ts[31:16] <= s_data; hdr_pos <= 2'd1; end
          2'd1: begin ts[15:0] <= s_data; hdr_pos <= 2'd2; ch <= '0; sum <= '0; hit <= 1'b0; end
          default: begin
            if (ch == CW'(NCH - 1)) begin
              ch  <= '0;
              sum <= '0;
              if (sum_next > threshold) hit <= 1'b1;
            end else begin
              ch  <= ch + 1'b1;
              sum <= sum_next;
            end
            if (s_last) begin
              hdr_pos <= 2'd0;
              evno    <= evno + 1'b1;
            end
          end
        endcase
      end
      // candidate sequencer
      if (out_busy && m_ready) begin
        if (out_pos == 2'd2) begin
          out_busy <= 1'b0;
          out_pos  <= '0;
        end else out_pos <= out_pos + 1'b1;
      end
      if (fire) begin
        if (out_busy) dropped <= dropped + 1'b1;
        else begin
          out_busy   <= 1'b1;
          out_pos    <= '0;
          c_evno     <= evno;
          c_ts       <= ts;
          candidates <= candidates + 1'b1;
        end
      end
    end
  end
endmodule
