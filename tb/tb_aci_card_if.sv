// tb_aci_card_if: drives 16 serial ADC lanes, 12 bits per sample MSB first,
// with a frame signal high for the first 6 bits of each sample. The sample
// vectors coming out must equal the values sent, one vector per 12 clocks.
// A frame edge inserted in the middle of a sample must be counted as a frame
// error and that damaged sample must not come out.
`timescale 1ns/1ps
module tb_aci_card_if;
  localparam int NCH = 16, W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NCH-1:0] lane;
  logic           frame, sample_valid;
  logic [W-1:0]   sample [NCH];
  logic [31:0]    frame_errors;

  aci_card_if #(.NCH(NCH), .ADC_W(W)) dut (.*);

  logic [W-1:0] expq [$][NCH];
  int got = 0, last_cycle = -1, cycle = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && sample_valid) begin
      got++;
      if (last_cycle >= 0) begin
        checks++;
        if (cycle - last_cycle != 12) begin failures++; $display("spacing %0d", cycle - last_cycle); end
      end
      last_cycle = cycle;
      if (expq.size() == 0) begin failures++; checks++; $display("unexpected sample"); end
      else begin
        for (int c = 0; c < NCH; c++) begin
          checks++;
          if (sample[c] !== expq[0][c]) begin failures++; $display("ch%0d %h exp %h", c, sample[c], expq[0][c]); end
        end
        void'(expq.pop_front());
      end
    end
  end

  task automatic send(input int nbits);   // nbits < 12 sends a cut-off sample
    logic [W-1:0] v [NCH];
    for (int c = 0; c < NCH; c++) v[c] = W'($urandom);
    if (nbits == W) expq.push_back(v);
    for (int b = 0; b < nbits; b++) begin
      for (int c = 0; c < NCH; c++) lane[c] <= v[c][W-1-b];
      frame <= (b < W/2);
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane = '0; frame = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 30; i++) send(W);
    send(8);                      // cut short: the next frame edge comes early
    last_cycle = -1;
    for (int i = 0; i < 30; i++) send(W);
    frame <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != 60) begin failures++; $display("samples %0d exp 60", got); end
    checks++;
    if (frame_errors != 1) begin failures++; $display("frame_errors %0d", frame_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
