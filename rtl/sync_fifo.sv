// sync_fifo: single-clock first-word-fall-through FIFO with valid/ready on both
// sides. It is the "FIFO-like interface" element that buffers the word streams
// between functional blocks. The head word is presented on out_data whenever
// out_valid is high; a word moves when valid and ready are both high.
// DEPTH must be a power of two. count gives the current fill level.
// Depth and the first-word-fall-through behaviour are this design's choices.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the reset-disable of the assertion below, which is
// not logic.
module sync_fifo #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign in_ready  = (count != DEPTH[AW:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[AW:0]);
endmodule
