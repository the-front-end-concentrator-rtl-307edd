// tb_gbe_interface: hands frames of 14..100 bytes to the transmit MAC and
// watches txd/tx_en. Each burst must be 7 x 0x55, 0xD5, the frame bytes,
// zero padding to 60 bytes, and a 4-byte FCS equal to the CRC-32 worked out
// here bit by bit; between bursts tx_en must stay low for at least 12 clocks.
`timescale 1ns/1ps
module tb_gbe_interface;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       b_valid, b_ready, b_last, tx_en;
  logic [7:0] b_data, txd;
  logic [31:0] frames_sent;

  gbe_interface #(.IFG_BYTES(12)) dut (.*);

  // frame source: a whole frame is offered without gaps
  logic [7:0] cur [$];
  logic [7:0] frames [$][$];
  int bi = 0;
  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) begin
      bi++;
      if (b_last) begin void'(frames.pop_front()); bi = 0; end
    end
  end
  always_comb begin
    b_valid = frames.size() != 0;
    b_data  = b_valid ? frames[0][bi] : 8'h00;
    b_last  = b_valid && (bi == frames[0].size() - 1);
  end

  function automatic logic [31:0] fcs_of(input logic [7:0] d [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[i]) for (int b = 0; b < 8; b++) begin
      logic fb;
      fb = c[0] ^ d[i][b];
      c = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'hEDB8_8320;
    end
    return ~c;
  endfunction

  logic [7:0] expf [$][$];
  logic [7:0] burst [$];
  int idle = 100, nbursts = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_en) begin
      if (burst.size() == 0) begin
        checks++;
        if (idle < 12) begin failures++; $display("gap %0d", idle); end
      end
      burst.push_back(txd);
      idle = 0;
    end else begin
      idle++;
      if (burst.size() != 0) begin
        logic [7:0] e [$];
        logic [7:0] body [$];
        logic [31:0] f;
        nbursts++;
        e = expf.pop_front();
        while (e.size() < 60) e.push_back(8'h00);
        f = fcs_of(e);
        body = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
        foreach (e[i]) body.push_back(e[i]);
        for (int i = 0; i < 4; i++) body.push_back(f[8 * i +: 8]);
        checks++;
        if (burst.size() != body.size()) begin failures++; $display("burst %0d bytes exp %0d", burst.size(), body.size()); end
        else foreach (body[i]) begin
          checks++;
          if (burst[i] !== body[i]) begin failures++; $display("byte %0d %h exp %h", i, burst[i], body[i]); end
        end
        burst.delete();
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      logic [7:0] fr [$];
      int n;
      fr.delete();
      n = 14 + $urandom % 87;
      for (int i = 0; i < n; i++) fr.push_back(8'($urandom));
      expf.push_back(fr);
      frames.push_back(fr);
      if ($urandom % 2) repeat ($urandom % 300) @(posedge clk);
    end
    while (frames.size() != 0 || expf.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (nbursts != 20 || frames_sent != 20) begin failures++; $display("bursts %0d sent %0d", nbursts, frames_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
