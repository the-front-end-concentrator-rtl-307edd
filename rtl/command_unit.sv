// command_unit: Command Unit of the Control Unit.
//
// It executes the command frames checked by the DTC Data IN Control. The
// frame identifier selects the command:
//   ACQ_ON    (no data)  acquisition on, one-clock acq_start pulse
//   ACQ_OFF   (no data)  acquisition off
//   TS_SYNC   (2 words)  load the timestamp counter with {word0, word1}
//   TRIGGER   (1 word)   accepted trigger for the event number in word0; passed
//                        to the DDR2 Read Control (dropped and counted if its
//                        queue is full)
//   CFG_WRITE (3 words)  write {word1, word2} to configuration register word0
// A frame with an unknown identifier or the wrong length is ignored and
// counted in bad_cmds. All outputs are registered and follow the frame by one
// clock.
// Acquisition on/off, timestamp synchronisation and trigger commands follow
// the document; the codes, lengths and the configuration-write command are
// this design's choices.
module command_unit
  import fec_pkg::*;
#(
  parameter int unsigned MAX_LEN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_valid,
  input  logic [3:0]  frame_id,
  input  logic [11:0] frame_len,
  input  logic [15:0] frame_data [MAX_LEN],
  output logic        acq_on,
  output logic        acq_start,
  output logic        ts_load,
  output logic [31:0] ts_value,
  output logic        trig_valid,
  input  logic        trig_ready,
  output logic [15:0] trig_evno,
  output logic        cfg_we,
  output logic [2:0]  cfg_addr,
  output logic [31:0] cfg_wdata,
  output logic [31:0] bad_cmds,
  output logic [31:0] trig_dropped
);
  cmd_id_e id;
  assign id = cmd_id_e'(frame_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_on       <= 1'b0;
      acq_start    <= 1'b0;
      ts_load      <= 1'b0;
      ts_value     <= '0;
      trig_valid   <= 1'b0;
      trig_evno    <= '0;
      cfg_we       <= 1'b0;
      cfg_addr     <= '0;
      cfg_wdata    <= '0;
      bad_cmds     <= '0;
      trig_dropped <= '0;
    end else begin
      acq_start <= 1'b0;
      ts_load   <= 1'b0;
      cfg_we    <= 1'b0;
      if (trig_valid && trig_ready) trig_valid <= 1'b0;
      if (frame_valid) begin
        unique case (id)
          CMD_ACQ_ON: if (frame_len == 12'd0) begin
            acq_on    <= 1'b1;
            acq_start <= 1'b1;
          end else bad_cmds <= bad_cmds + 1'b1;
          CMD_ACQ_OFF: if (frame_len == 12'd0) acq_on <= 1'b0;
                       else bad_cmds <= bad_cmds + 1'b1;
          CMD_TS_SYNC: if (frame_len == 12'd2) begin
            ts_load  <= 1'b1;
            ts_value <= {frame_data[0], frame_data[1]};
          end else bad_cmds <= bad_cmds + 1'b1;
          CMD_TRIGGER: if (frame_len == 12'd1) begin
            if (trig_valid && !trig_ready) trig_dropped <= trig_dropped + 1'b1;
            else begin
              trig_valid <= 1'b1;
              trig_evno  <= frame_data[0];
            end
          end else bad_cmds <= bad_cmds + 1'b1;
          CMD_CFG_WRITE: if (frame_len == 12'd3) begin
            cfg_we    <= 1'b1;
            cfg_addr  <= frame_data[0][2:0];
            cfg_wdata <= {frame_data[1], frame_data[2]};
          end else bad_cmds <= bad_cmds + 1'b1;
          default: bad_cmds <= bad_cmds + 1'b1;
        endcase
      end
    end
  end

  initial assert (MAX_LEN >= 3);
endmodule
