// ddr2_read_ctrl: Read Control of the DDR2 Interface.
//
// Accepted-trigger requests (an event number each) are queued in a small
// FIFO. For each one the slot (event number mod 2^(ADDR_W-log2 SLOT_WORDS))
// is checked first: header words 0, 1 and 4 are read one at a time. If the
// marker or the event number is wrong (the slot was never written, or a later
// event has overwritten it), the request is dropped and counted in misses.
// Otherwise word 4 gives the event length: 5 header words plus the sample
// words, limited to the slot size. The whole event is then read from the slot
// base with reads pipelined, several in flight. A credit rule keeps the words
// in flight plus the words in the OUT_DEPTH output FIFO within that depth, so
// returning data always has room. The output is a word stream with last on
// the final word.
// Memory port: a read is requested with mem_req (mem_we low) and taken when
// mem_ready is high. Its data returns in order with mem_rvalid some clocks
// later. With a short latency and the port free, one word goes out per clock.
// The document says that a valid trigger sends the buffered data towards the
// GbE interface. The queue, the checks, the pipelining and the port protocol
// are this design's choices.
// The trigger queue's fill-level output is left open on purpose. Lint notes
// it as an empty pin.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the reset-disable of the assertion below, which is
// not logic.
module ddr2_read_ctrl
  import fec_pkg::*;
#(
  parameter int unsigned ADDR_W     = 27,
  parameter int unsigned SLOT_WORDS = 2048,
  parameter int unsigned TRIG_DEPTH = 8,
  parameter int unsigned OUT_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig_valid,
  output logic              trig_ready,
  input  logic [15:0]       trig_evno,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [15:0]       mem_rdata,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [15:0]       m_data,
  output logic              m_last,
  output logic [31:0]       events_read,
  output logic [31:0]       misses
);
  localparam int unsigned OW = $clog2(SLOT_WORDS);
  localparam int unsigned NW = ADDR_W - OW;
  localparam int unsigned CW = $clog2(OUT_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_CREQ, S_CWAIT, S_SEND} state_e;
  state_e state;

  logic        q_valid, q_pop;
  logic [15:0] q_evno;
  logic [15:0] evno;
  logic [1:0]  ck;                 // header check step: words 0, 1, 4
  logic [OW:0] iss_idx, rx_idx, total;
  logic [OW:0] inflight;
  logic [CW:0] out_count;
  logic        can_issue, rx_last, o_ready;

  sync_fifo #(.W(16), .DEPTH(TRIG_DEPTH)) u_trigq (
    .clk (clk), .rst_n (rst_n),
    .in_valid (trig_valid), .in_ready (trig_ready), .in_data (trig_evno),
    .out_valid (q_valid), .out_ready (q_pop), .out_data (q_evno), .count ()
  );

  sync_fifo #(.W(17), .DEPTH(OUT_DEPTH)) u_outq (
    .clk (clk), .rst_n (rst_n),
    .in_valid (state == S_SEND && mem_rvalid), .in_ready (o_ready),
    .in_data ({rx_last, mem_rdata}),
    .out_valid (m_valid), .out_ready (m_ready), .out_data ({m_last, m_data}),
    .count (out_count)
  );

  assign inflight  = iss_idx - rx_idx;
  assign can_issue = (iss_idx != total)
                  && (32'(inflight) + 32'(out_count) < OUT_DEPTH);
  assign rx_last   = (rx_idx == total - 1'b1);
  assign q_pop     = (state == S_IDLE) && q_valid;
  assign mem_req   = (state == S_CREQ) || (state == S_SEND && can_issue);
  assign mem_we    = 1'b0;
  always_comb begin
    if (state == S_SEND) mem_addr = {NW'(evno), iss_idx[OW-1:0]};
    else                 mem_addr = {NW'(evno), OW'(ck == 2'd2 ? 4 : ck)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      evno        <= '0;
      ck          <= '0;
      iss_idx     <= '0;
      rx_idx      <= '0;
      total       <= '0;
      events_read <= '0;
      misses      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (q_valid) begin
          evno  <= q_evno;
          ck    <= '0;
          state <= S_CREQ;
        end
        S_CREQ: if (mem_ready) state <= S_CWAIT;
        S_CWAIT: if (mem_rvalid) begin
          if ((ck == 2'd0 && mem_rdata != EVT_HDR) || (ck == 2'd1 && mem_rdata != evno)) begin
            misses <= misses + 1'b1;
            state  <= S_IDLE;
          end else if (ck != 2'd2) begin
            ck    <= ck + 1'b1;
            state <= S_CREQ;
          end else begin
            if (32'(mem_rdata) + EVT_HDR_WORDS > SLOT_WORDS) total <= (OW+1)'(SLOT_WORDS);
            else total <= (OW+1)'(32'(mem_rdata) + EVT_HDR_WORDS);
            iss_idx <= '0;
            rx_idx  <= '0;
            state   <= S_SEND;
          end
        end
        S_SEND: begin
          if (can_issue && mem_ready) iss_idx <= iss_idx + 1'b1;
          if (mem_rvalid) begin
            rx_idx <= rx_idx + 1'b1;
            if (rx_last) begin
              events_read <= events_read + 1'b1;
              state       <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The credit rule means returning data always finds room in the output FIFO.
  a_room: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEND && mem_rvalid) |-> o_ready);
endmodule
