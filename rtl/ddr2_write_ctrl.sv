// ddr2_write_ctrl: Write Control of the DDR2 Interface.
//
// The DDR2 buffer (256 MB, 16-bit words, so 2^27 word addresses) is used as
// a ring of NSLOTS event slots of SLOT_WORDS words. Each formatted event
// (EVT_HDR, event number, ...) is written to slot (event number mod NSLOTS),
// word by word from the slot base, through a simple word-wide request port of
// the memory controller: mem_req/mem_we/mem_addr/mem_wdata, a word is taken
// when mem_ready is high. Words of an event beyond SLOT_WORDS are dropped and
// counted in truncated. The first word is held until the event number
// (second word) is known, so the stream is stalled for two clocks at the
// start of each event. Events are at least two words long; the marker is not
// checked here but on read-back.
// The 256 MB size and the 16-bit word follow the document; the slot layout
// and port protocol are this design's choices.
module ddr2_write_ctrl
  import fec_pkg::*;
#(
  parameter int unsigned ADDR_W     = 27,    // 256 MB of 16-bit words
  parameter int unsigned SLOT_WORDS = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [15:0]       s_data,
  input  logic              s_last,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic              mem_ready,
  output logic [31:0]       events_written,
  output logic [31:0]       truncated
);
  localparam int unsigned OW = $clog2(SLOT_WORDS);
  localparam int unsigned NW = ADDR_W - OW;   // slot-number width

  typedef enum logic [1:0] {S_W0, S_W1, S_WR0, S_DATA} state_e;
  state_e state;

  logic [15:0]       w0;
  logic [NW-1:0]     slot;
  logic [OW:0]       idx;

  always_comb begin
    mem_we    = 1'b1;
    mem_req   = 1'b0;
    mem_wdata = s_data;
    mem_addr  = {slot, idx[OW-1:0]};
    s_ready   = 1'b0;
    unique case (state)
      S_W0:  s_ready = 1'b1;
      S_W1:  s_ready = 1'b0;
      S_WR0: begin mem_req = 1'b1; mem_wdata = w0; end
      S_DATA: begin
        if (idx < (OW+1)'(SLOT_WORDS)) begin
          mem_req = s_valid;
          s_ready = mem_ready;
        end else begin
          s_ready = 1'b1;  // beyond the slot: consume and drop
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_W0;
      w0             <= '0;
      slot           <= '0;
      idx            <= '0;
      events_written <= '0;
      truncated      <= '0;
    end else begin
      unique case (state)
        S_W0: if (s_valid) begin
          w0 <= s_data;
          state <= S_W1;
        end
        S_W1: if (s_valid) begin
          slot  <= NW'(s_data);
          idx   <= '0;
          state <= S_WR0;
        end
        S_WR0: if (mem_ready) begin
          idx   <= 1;
          state <= S_DATA;
        end
        S_DATA: if (s_valid && s_ready) begin
          if (idx >= (OW+1)'(SLOT_WORDS)) truncated <= truncated + 1'b1;
          else idx <= idx + 1'b1;
          if (s_last) begin
            state          <= S_W0;
            events_written <= events_written + 1'b1;
          end
        end
        default: state <= S_W0;
      endcase
    end
  end

  initial assert (SLOT_WORDS >= 8 && (1 << OW) == SLOT_WORDS && NW >= 1);
endmodule
