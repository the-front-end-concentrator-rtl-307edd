// system_unit: System Unit of the Control Unit.
//
// It synchronises the board reset to the firmware clock (asserted at once,
// released two clocks after the board reset goes away) and keeps the 32-bit
// timestamp counter that stamps events. The counter advances by one every
// clock and is loaded by a timestamp-synchronisation command (ts_load, the
// loaded value appears on the next clock and counts on from there).
// Timestamp synchronisation follows the document's list of commands; the
// counter width, its one-count-per-clock rate and the reset scheme are this
// design's choices.
// Lint reports rst_sync as flopped both synchronously and asynchronously: its
// last stage is the reset of the rest of the design, and its own flops are
// cleared by the board reset. This is the usual reset synchroniser and is
// intended.
module system_unit (
  input  logic        clk,
  input  logic        ext_rst_n,
  output logic        rst_n,
  input  logic        ts_load,
  input  logic [31:0] ts_value,
  output logic [31:0] timestamp
);
  logic [1:0] rst_sync;

  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) rst_sync <= '0;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       timestamp <= '0;
    else if (ts_load) timestamp <= ts_value;
    else              timestamp <= timestamp + 1'b1;
  end
endmodule
