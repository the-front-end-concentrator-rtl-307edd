// ddr2_mem_model: behavioural model of the DDR2 controller's user side, for
// simulation only. It holds 16-bit words in a sparse array, accepts a request
// when mem_ready is high (ready drops at random when BUSY_PCT > 0), stores
// writes at once and returns read data LATENCY clocks after the read was
// accepted. Reads of never-written words return 16'hDEAD.
module ddr2_mem_model #(
  parameter int ADDR_W   = 27,
  parameter int LATENCY  = 6,
  parameter int BUSY_PCT = 20
) (
  input  logic              clk,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [15:0]       mem_wdata,
  output logic              mem_ready,
  output logic              mem_rvalid,
  output logic [15:0]       mem_rdata
);
  logic [15:0] mem [logic [ADDR_W-1:0]];
  logic [15:0] rpipe [LATENCY];
  logic        vpipe [LATENCY];
  int          writes = 0, reads = 0;

  initial begin
    mem_ready = 1'b0;
    for (int i = 0; i < LATENCY; i++) begin vpipe[i] = 1'b0; rpipe[i] = '0; end
  end

  assign mem_rvalid = vpipe[LATENCY-1];
  assign mem_rdata  = rpipe[LATENCY-1];

  always @(posedge clk) begin
    for (int i = LATENCY - 1; i > 0; i--) begin
      vpipe[i] <= vpipe[i-1];
      rpipe[i] <= rpipe[i-1];
    end
    vpipe[0] <= 1'b0;
    if (mem_req && mem_ready) begin
      if (mem_we) begin
        mem[mem_addr] = mem_wdata;
        writes++;
      end else begin
        vpipe[0] <= 1'b1;
        rpipe[0] <= mem.exists(mem_addr) ? mem[mem_addr] : 16'hDEAD;
        reads++;
      end
    end
    mem_ready <= ($urandom % 100) >= BUSY_PCT;
  end
endmodule
