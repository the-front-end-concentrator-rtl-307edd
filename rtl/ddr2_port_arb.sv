// ddr2_port_arb: shares the word-wide DDR2 controller port between the Write
// Control and the Read Control. When both request, the grant alternates after
// each accepted transfer, so neither can starve the other; a lone request is
// granted at once. The grant is combinational, and the request of the side
// not granted simply waits (its ready stays low). Read data returns to the
// Read Control only, since writes return nothing. Write data is driven only
// while the write side holds the grant, and is zero during reads.
// This arbiter is this design's own: the document names the two controls but
// not how they share the memory.
module ddr2_port_arb #(
  parameter int unsigned ADDR_W = 27
) (
  input  logic              clk,
  input  logic              rst_n,
  // write side
  input  logic              w_req,
  input  logic [ADDR_W-1:0] w_addr,
  input  logic [15:0]       w_wdata,
  output logic              w_ready,
  // read side
  input  logic              r_req,
  input  logic [ADDR_W-1:0] r_addr,
  output logic              r_ready,
  // controller port
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic              mem_ready
);
  logic prio_r;   // 1: read side wins a tie
  logic grant_r;

  assign grant_r   = r_req && (!w_req || prio_r);
  assign mem_req   = w_req || r_req;
  assign mem_we    = !grant_r;
  assign mem_addr  = grant_r ? r_addr : w_addr;
  assign mem_wdata = grant_r ? 16'h0 : w_wdata;
  assign r_ready   = grant_r && mem_ready;
  assign w_ready   = !grant_r && w_req && mem_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_r <= 1'b0;
    else if (mem_req && mem_ready) prio_r <= !grant_r;
  end
endmodule
