// fec_interconnect: the Configurable Interconnect Unit.
//
// It moves 16-bit word streams (valid/ready, with a last flag) between the
// functional blocks. Each of NDST sinks has a FIFO and a route field in the
// route register that names which of the NSRC sources feeds it. A source may
// feed several sinks at once (broadcast): one of its words moves only when
// every sink that selects it has room, and is then written to all of them.
// A source that no sink selects is held (its ready stays low). The route
// register can be changed at any time; changing it in the middle of a frame
// splits that frame, so it should be changed between frames.
// The unit's role, FIFO-like interfaces and programmability follow the
// document; the port count, route encoding and FIFO depth are this design's
// choices.
// The sink FIFOs' fill-level outputs are left open on purpose, since only
// valid/ready is used. Lint notes this as an empty pin.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the reset-disable of the assertion in sync_fifo,
// which is not logic.
module fec_interconnect #(
  parameter int unsigned NSRC  = 4,
  parameter int unsigned NDST  = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NDST*$clog2(NSRC)-1:0]    route,   // sink d takes source route[d*SW +: SW]
  input  logic [NSRC-1:0]                 src_valid,
  output logic [NSRC-1:0]                 src_ready,
  input  logic [NSRC-1:0][16:0]           src_data,  // {last, word}
  output logic [NDST-1:0]                 dst_valid,
  input  logic [NDST-1:0]                 dst_ready,
  output logic [NDST-1:0][16:0]           dst_data
);
  localparam int unsigned SW = $clog2(NSRC);

  logic [NDST-1:0]       fifo_ready;
  logic [NDST-1:0]       fifo_push;
  logic [SW-1:0]         sel [NDST];

  always_comb begin
    for (int d = 0; d < int'(NDST); d++) sel[d] = route[d*SW +: SW];
    for (int s = 0; s < int'(NSRC); s++) begin
      logic used;
      used         = 1'b0;
      src_ready[s] = 1'b1;
      for (int d = 0; d < int'(NDST); d++) begin
        if (sel[d] == SW'(s)) begin
          used = 1'b1;
          if (!fifo_ready[d]) src_ready[s] = 1'b0;
        end
      end
      if (!used) src_ready[s] = 1'b0;
    end
    for (int d = 0; d < int'(NDST); d++)
      fifo_push[d] = src_valid[sel[d]] && src_ready[sel[d]];
  end

  for (genvar d = 0; d < NDST; d++) begin : g_sink
    sync_fifo #(.W(17), .DEPTH(DEPTH)) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (fifo_push[d]),
      .in_ready  (fifo_ready[d]),
      .in_data   (src_data[sel[d]]),
      .out_valid (dst_valid[d]),
      .out_ready (dst_ready[d]),
      .out_data  (dst_data[d]),
      .count     ()
    );
  end
endmodule
