// fec_top: FEC firmware top level.
//
// It joins the functional blocks of the Front-End Concentrator firmware,
// arranged as in the usual NEXT-style PMT readout:
//   Adapter Card Interface  16 serial ADC lanes -> sample vectors -> raw events
//                           (a window of EVENT_SAMPLES samples per NIM trigger)
//   Process Unit            Data Format Unit adds the event header; the
//                           Data/System Processor finds trigger candidates
//   DDR2 Interface          Write Control stores every event in the DDR2 ring;
//                           Read Control reads one back on an accepted trigger
//   GbE Interface           UDP/IPv4/Ethernet frames on a GMII-style port
//   DTC Interface           200 Mb/s data line (trigger candidates out) and
//                           command line (commands in), NIM trigger in/out
//   Control Unit            Command, Config and System Units
//   Configurable Interconnect Unit  FIFO streams between the blocks:
//     sources 0 adapter-card raw events, 1 formatted events,
//             2 events read from DDR2,   3 trigger candidates
//     sinks   0 Data Format Unit,        1 DDR2 Write Control,
//             2 GbE Data OUT Control,    3 DTC Data OUT Control
//   The default route is sink d <- source d; routing sink 2 to source 1 sends
//   every event straight to Ethernet as well as to DDR2.
// Nearly everything runs on one clock, clk (100 MHz, the DTC link clock). The
// exception is the Ethernet byte side: the GbE sender's output half and the
// MAC run on gmii_tx_clk (125 MHz) with their own synchronised reset.
// gmii_frames counts frames in that clock domain; the status registers hold
// only counters from the clk domain. The DDR2 controller and device, the
// clock manager, the SFP/PHY and the LVDS/NIM buffers are outside: their
// logic-side signals are the ports of this module. The block list and the data flow
// follow the document's firmware description; the clocking and all
// interfaces between blocks are this design's choices.
// Lint reports the reset synchronisers' flops as used both synchronously and
// asynchronously; that is how a reset synchroniser works.
module fec_top
  import fec_pkg::*;
#(
  parameter int unsigned NCH           = 16,
  parameter int unsigned ADC_W         = 12,
  parameter int unsigned EVENT_SAMPLES = 32,
  parameter int unsigned ADDR_W        = 27,
  parameter int unsigned SLOT_WORDS    = 2048,
  parameter int unsigned GBE_MAX_WORDS = 4486,
  parameter int unsigned DTC_MAX_LEN   = 256,
  parameter bit          DTC_CRC_EN    = 1'b0,
  parameter int unsigned IC_DEPTH      = 16
) (
  input  logic              clk,
  input  logic              ext_rst_n,
  // adapter card (CERN ADC card) serial lanes
  input  logic [NCH-1:0]    adc_lane,
  input  logic              adc_frame,
  // DTC link, logic side of the LVDS pairs (2 bits per clock)
  input  logic [1:0]        dtc_cmd_bits,
  output logic [1:0]        dtc_data_bits,
  // NIM trigger
  input  logic              nim_in,
  output logic              nim_out,
  // DDR2 controller user port
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [15:0]       mem_rdata,
  // GbE transmit (GMII-style), on its own clock
  input  logic              gmii_tx_clk,
  output logic [7:0]        gmii_txd,
  output logic              gmii_tx_en,
  output logic [31:0]       gmii_frames,
  // status read port
  input  logic [4:0]        reg_rd_addr,
  output logic [31:0]       reg_rd_data
);
  localparam int unsigned NSTAT = 17;

  logic        rst_n;
  logic [31:0] timestamp;
  cfg_t        cfg;

  // control
  logic        acq_on, acq_start, ts_load;
  logic [31:0] ts_value;
  logic        trig_valid, trig_ready;
  logic [15:0] trig_evno;
  logic        cfg_we;
  logic [2:0]  cfg_addr;
  logic [31:0] cfg_wdata;
  logic [31:0] bad_cmds, trig_dropped;

  // DTC
  logic        dtc_w_valid, dtc_w_ready;
  logic [15:0] dtc_w_data;
  logic        dtc_r_valid, dtc_resync, dtc_locked;
  logic [15:0] dtc_r_data;
  logic        nim_trig;
  logic        cmd_frame_valid;
  logic [3:0]  cmd_frame_id;
  logic [11:0] cmd_frame_len;
  logic [15:0] cmd_frame_data [4];
  logic [31:0] cmd_frames_ok, cmd_frame_errors, dtc_frames_sent;

  // adapter card
  logic             smp_valid;
  logic [ADC_W-1:0] smp [NCH];
  logic [31:0]      adc_frame_errors, acq_events, acq_busy;

  // interconnect
  logic [3:0]       src_valid, src_ready, dst_valid, dst_ready;
  logic [3:0][16:0] src_data, dst_data;

  // process unit
  logic [15:0] event_no;
  logic [31:0] candidates, cand_dropped;

  // DDR2
  logic              w_req, w_ready, r_req, r_ready, r_we_unused;
  logic [ADDR_W-1:0] w_addr, r_addr;
  logic [15:0]       w_wdata;
  logic              w_we_unused;
  logic [31:0]       events_written, truncated, events_read, misses;

  // GbE
  logic        b_valid, b_ready, b_last;
  logic [7:0]  b_data;
  logic [31:0] udp_frames;
  logic [1:0]  tx_rst_sync;
  logic        tx_rst_n;

  logic [31:0] status [NSTAT];

  // ---------------- Control Unit ----------------
  system_unit u_system (
    .clk (clk), .ext_rst_n (ext_rst_n), .rst_n (rst_n),
    .ts_load (ts_load), .ts_value (ts_value), .timestamp (timestamp)
  );

  command_unit #(.MAX_LEN(4)) u_command (
    .clk (clk), .rst_n (rst_n),
    .frame_valid (cmd_frame_valid), .frame_id (cmd_frame_id),
    .frame_len (cmd_frame_len), .frame_data (cmd_frame_data),
    .acq_on (acq_on), .acq_start (acq_start),
    .ts_load (ts_load), .ts_value (ts_value),
    .trig_valid (trig_valid), .trig_ready (trig_ready), .trig_evno (trig_evno),
    .cfg_we (cfg_we), .cfg_addr (cfg_addr), .cfg_wdata (cfg_wdata),
    .bad_cmds (bad_cmds), .trig_dropped (trig_dropped)
  );

  assign status = '{acq_events, acq_busy, candidates, events_written,
                    events_read, misses, udp_frames, cmd_frames_ok,
                    cmd_frame_errors, dtc_frames_sent, bad_cmds, adc_frame_errors,
                    trig_dropped, 32'(dtc_locked), 32'(event_no), cand_dropped,
                    truncated};

  config_unit #(.NSTAT(NSTAT)) u_config (
    .clk (clk), .rst_n (rst_n),
    .we (cfg_we), .waddr (cfg_addr), .wdata (cfg_wdata),
    .cfg (cfg), .status (status),
    .rd_addr (reg_rd_addr), .rd_data (reg_rd_data)
  );

  // ---------------- DTC Interface ----------------
  dtc_lvds_nim_if u_lvds_nim (
    .clk (clk), .rst_n (rst_n),
    .w_valid (dtc_w_valid), .w_ready (dtc_w_ready), .w_data (dtc_w_data),
    .tx_bits (dtc_data_bits),
    .rx_bits (dtc_cmd_bits), .resync (dtc_resync),
    .r_valid (dtc_r_valid), .r_data (dtc_r_data), .locked (dtc_locked),
    .nim_in (nim_in), .trig_in (nim_trig),
    .trig_out (src_valid[3] && src_ready[3] && src_data[3][16]), .nim_out (nim_out)
  );

  dtc_data_in_ctrl #(.MAX_LEN(4), .CRC_EN(DTC_CRC_EN)) u_dtc_in (
    .clk (clk), .rst_n (rst_n),
    .w_valid (dtc_r_valid), .w_data (dtc_r_data),
    .frame_valid (cmd_frame_valid), .frame_id (cmd_frame_id),
    .frame_len (cmd_frame_len), .frame_data (cmd_frame_data),
    .resync (dtc_resync), .frames_ok (cmd_frames_ok), .frame_errors (cmd_frame_errors)
  );

  dtc_data_out_ctrl #(.MAX_LEN(DTC_MAX_LEN), .CRC_EN(DTC_CRC_EN)) u_dtc_out (
    .clk (clk), .rst_n (rst_n),
    .s_valid (dst_valid[3]), .s_ready (dst_ready[3]),
    .s_data (dst_data[3][15:0]), .s_last (dst_data[3][16]), .s_id (ID_TRIG_CAND),
    .m_valid (dtc_w_valid), .m_ready (dtc_w_ready), .m_data (dtc_w_data),
    .frames_sent (dtc_frames_sent)
  );

  // ---------------- Adapter Card Interface ----------------
  aci_card_if #(.NCH(NCH), .ADC_W(ADC_W)) u_card_if (
    .clk (clk), .rst_n (rst_n),
    .lane (adc_lane), .frame (adc_frame),
    .sample_valid (smp_valid), .sample (smp), .frame_errors (adc_frame_errors)
  );

  aci_data_in_ctrl #(.NCH(NCH), .ADC_W(ADC_W), .EVENT_SAMPLES(EVENT_SAMPLES)) u_aci_in (
    .clk (clk), .rst_n (rst_n),
    .acq_on (acq_on), .trigger (nim_trig), .timestamp (timestamp),
    .sample_valid (smp_valid), .sample (smp),
    .m_valid (src_valid[0]), .m_ready (src_ready[0]),
    .m_data (src_data[0][15:0]), .m_last (src_data[0][16]),
    .events (acq_events), .busy_count (acq_busy)
  );

  // ---------------- Configurable Interconnect Unit ----------------
  fec_interconnect #(.NSRC(4), .NDST(4), .DEPTH(IC_DEPTH)) u_interconnect (
    .clk (clk), .rst_n (rst_n), .route (cfg.route),
    .src_valid (src_valid), .src_ready (src_ready), .src_data (src_data),
    .dst_valid (dst_valid), .dst_ready (dst_ready), .dst_data (dst_data)
  );

  // ---------------- Process Unit ----------------
  data_format_unit #(.NWORDS(EVENT_SAMPLES * NCH)) u_format (
    .clk (clk), .rst_n (rst_n), .acq_start (acq_start),
    .s_valid (dst_valid[0]), .s_ready (dst_ready[0]),
    .s_data (dst_data[0][15:0]), .s_last (dst_data[0][16]),
    .m_valid (src_valid[1]), .m_ready (src_ready[1]),
    .m_data (src_data[1][15:0]), .m_last (src_data[1][16]),
    .event_no (event_no)
  );

  data_system_processor #(.NCH(NCH), .ADC_W(ADC_W)) u_processor (
    .clk (clk), .rst_n (rst_n), .acq_start (acq_start), .threshold (cfg.threshold),
    .s_valid (dst_valid[0]), .s_ready (dst_ready[0]),
    .s_data (dst_data[0][15:0]), .s_last (dst_data[0][16]),
    .m_valid (src_valid[3]), .m_ready (src_ready[3]),
    .m_data (src_data[3][15:0]), .m_last (src_data[3][16]),
    .candidates (candidates), .dropped (cand_dropped)
  );

  // ---------------- DDR2 Interface ----------------
  ddr2_write_ctrl #(.ADDR_W(ADDR_W), .SLOT_WORDS(SLOT_WORDS)) u_ddr_wr (
    .clk (clk), .rst_n (rst_n),
    .s_valid (dst_valid[1]), .s_ready (dst_ready[1]),
    .s_data (dst_data[1][15:0]), .s_last (dst_data[1][16]),
    .mem_req (w_req), .mem_we (w_we_unused), .mem_addr (w_addr), .mem_wdata (w_wdata),
    .mem_ready (w_ready),
    .events_written (events_written), .truncated (truncated)
  );

  ddr2_read_ctrl #(.ADDR_W(ADDR_W), .SLOT_WORDS(SLOT_WORDS)) u_ddr_rd (
    .clk (clk), .rst_n (rst_n),
    .trig_valid (trig_valid), .trig_ready (trig_ready), .trig_evno (trig_evno),
    .mem_req (r_req), .mem_we (r_we_unused), .mem_addr (r_addr), .mem_ready (r_ready),
    .mem_rvalid (mem_rvalid), .mem_rdata (mem_rdata),
    .m_valid (src_valid[2]), .m_ready (src_ready[2]),
    .m_data (src_data[2][15:0]), .m_last (src_data[2][16]),
    .events_read (events_read), .misses (misses)
  );

  ddr2_port_arb #(.ADDR_W(ADDR_W)) u_ddr_arb (
    .clk (clk), .rst_n (rst_n),
    .w_req (w_req), .w_addr (w_addr), .w_wdata (w_wdata), .w_ready (w_ready),
    .r_req (r_req), .r_addr (r_addr), .r_ready (r_ready),
    .mem_req (mem_req), .mem_we (mem_we), .mem_addr (mem_addr),
    .mem_wdata (mem_wdata), .mem_ready (mem_ready)
  );

  // ---------------- GbE Interface ----------------
  // reset for the GMII clock domain: asserted with rst_n, released in step
  // with gmii_tx_clk
  always_ff @(posedge gmii_tx_clk or negedge rst_n) begin
    if (!rst_n) tx_rst_sync <= '0;
    else        tx_rst_sync <= {tx_rst_sync[0], 1'b1};
  end
  assign tx_rst_n = tx_rst_sync[1];

  gbe_data_out_ctrl #(.MAX_WORDS(GBE_MAX_WORDS)) u_gbe_out (
    .clk (clk), .rst_n (rst_n), .tx_clk (gmii_tx_clk), .tx_rst_n (tx_rst_n),
    .src_mac (cfg.src_mac), .dst_mac (cfg.dst_mac),
    .src_ip (cfg.src_ip), .dst_ip (cfg.dst_ip),
    .src_port (cfg.src_port), .dst_port (cfg.dst_port),
    .s_valid (dst_valid[2]), .s_ready (dst_ready[2]),
    .s_data (dst_data[2][15:0]), .s_last (dst_data[2][16]),
    .b_valid (b_valid), .b_ready (b_ready), .b_data (b_data), .b_last (b_last),
    .frames_sent (udp_frames)
  );

  gbe_interface u_gbe_mac (
    .clk (gmii_tx_clk), .rst_n (tx_rst_n),
    .b_valid (b_valid), .b_ready (b_ready), .b_data (b_data), .b_last (b_last),
    .txd (gmii_txd), .tx_en (gmii_tx_en), .frames_sent (gmii_frames)
  );
endmodule
