// config_unit: Config Unit of the Control Unit, the configuration/status
// register file.
//
// Eight 32-bit configuration registers are written through a one-clock write
// port (from the Command Unit) and drive the rest of the firmware as one cfg_t
// structure (see fec_pkg for the map). NSTAT 32-bit status words from the
// other blocks are sampled every clock into status registers. The read port
// returns, one clock after rd_addr, configuration register rd_addr for
// addresses 0..7 and status word rd_addr-8 above that.
// A register file of configuration and status registers follows the document;
// its map, widths and reset values (the default route, threshold, MAC and IP
// addresses and UDP ports) are this design's choices.
module config_unit
  import fec_pkg::*;
#(
  parameter int unsigned NSTAT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [2:0]  waddr,
  input  logic [31:0] wdata,
  output cfg_t        cfg,
  input  logic [31:0] status [NSTAT],
  input  logic [4:0]  rd_addr,
  output logic [31:0] rd_data
);
  localparam logic [31:0] RESET_VAL [CFG_NREGS] = '{
    32'h0000_00E4,   // route: sink3<-3, sink2<-2, sink1<-1, sink0<-0
    32'd20000,       // threshold on the 16-channel sum
    32'h0A00_0002,   // source IP 10.0.0.2
    32'h0A00_0003,   // destination IP 10.0.0.3
    32'h1776_1776,   // ports 6006 / 6006
    32'h0250_C200,   // source MAC 02:50:C2:00:00:02
    32'h0002_0250,   // {src MAC low, dst MAC high}
    32'hC200_0003    // destination MAC 02:50:C2:00:00:03
  };

  logic [31:0] regs [CFG_NREGS];
  logic [31:0] stat [NSTAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CFG_NREGS); i++) regs[i] <= RESET_VAL[i];
      for (int i = 0; i < int'(NSTAT); i++) stat[i] <= '0;
      rd_data <= '0;
    end else begin
      if (we) regs[waddr] <= wdata;
      stat <= status;
      if (rd_addr < 5'd8)                rd_data <= regs[rd_addr[2:0]];
      else if (32'(rd_addr) - 8 < NSTAT) rd_data <= stat[32'(rd_addr) - 8];
      else                               rd_data <= '0;
    end
  end

  always_comb begin
    cfg.route     = regs[REG_ROUTE][7:0];
    cfg.threshold = regs[REG_THRESHOLD][17:0];
    cfg.src_ip    = regs[REG_SRC_IP];
    cfg.dst_ip    = regs[REG_DST_IP];
    cfg.src_port  = regs[REG_PORTS][31:16];
    cfg.dst_port  = regs[REG_PORTS][15:0];
    cfg.src_mac   = {regs[REG_SRC_MAC_H], regs[REG_MAC_MIX][31:16]};
    cfg.dst_mac   = {regs[REG_MAC_MIX][15:0], regs[REG_DST_MAC_L]};
  end

  initial assert (NSTAT >= 1 && NSTAT <= 24);
endmodule
