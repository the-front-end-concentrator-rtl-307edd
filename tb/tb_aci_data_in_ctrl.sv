// tb_aci_data_in_ctrl: gives the Data IN Control a new random sample vector
// every 6 clocks and trigger pulses. Each accepted trigger must produce one
// raw event: the timestamp at the trigger (two words), then EVENT_SAMPLES x
// NCH words {channel, sample} taken from the samples that followed the
// trigger, sample-major, last on the final word. The output is read with
// random backpressure. Triggers while busy must be counted and ignored;
// triggers with acquisition off must be ignored.
`timescale 1ns/1ps
module tb_aci_data_in_ctrl;
  localparam int NCH = 16, W = 12, ES = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          acq_on, trigger, sample_valid;
  logic [31:0]   timestamp, events, busy_count;
  logic [W-1:0]  sample [NCH];
  logic          m_valid, m_ready, m_last;
  logic [15:0]   m_data;

  aci_data_in_ctrl #(.NCH(NCH), .ADC_W(W), .EVENT_SAMPLES(ES)) dut (.*);

  always @(posedge clk) timestamp <= rst_n ? timestamp + 1 : 32'd0;

  // sample generator
  int scnt = 0;
  always @(posedge clk) begin
    scnt <= (scnt == 5) ? 0 : scnt + 1;
    sample_valid <= (scnt == 5);
    if (scnt == 5) for (int c = 0; c < NCH; c++) sample[c] <= W'($urandom);
  end

  // reference model: follows triggers and samples, builds expected words
  logic [16:0] expq [$];
  int ref_state = 0, ref_s = 0, exp_events = 0, exp_busy = 0;
  logic [16:0] pending [$];
  int out_words_left = 0;
  always @(posedge clk) if (rst_n) begin
    if (trigger && acq_on) begin
      if (ref_state == 0) begin
        ref_state = 1; ref_s = 0;
        pending.push_back({1'b0, timestamp[31:16]});
        pending.push_back({1'b0, timestamp[15:0]});
      end else exp_busy++;
    end else if (ref_state == 1 && sample_valid) begin
      for (int c = 0; c < NCH; c++)
        pending.push_back({(ref_s == ES - 1) && (c == NCH - 1), 4'(c), sample[c]});
      ref_s++;
      if (ref_s == ES) begin
        ref_state = 2;
        foreach (pending[i]) expq.push_back(pending[i]);
        pending.delete();
        exp_events++;
      end
    end
    if (m_valid && m_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        logic [16:0] e;
        e = expq.pop_front();
        if ({m_last, m_data} !== e) begin failures++; $display("got %h exp %h", {m_last, m_data}, e); end
        if (m_last) ref_state = 0;
      end
    end
    m_ready <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acq_on = 0; trigger = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    trigger <= 1; @(posedge clk); trigger <= 0;   // acquisition off: ignored
    repeat (50) @(posedge clk);
    acq_on <= 1;
    for (int t = 0; t < 40; t++) begin
      repeat (10 + $urandom % 120) @(posedge clk);
      trigger <= 1; @(posedge clk); trigger <= 0;
    end
    repeat (400) @(posedge clk);
    checks += 3;
    if (events != 32'(exp_events)) begin failures++; $display("events %0d exp %0d", events, exp_events); end
    if (busy_count != 32'(exp_busy)) begin failures++; $display("busy %0d exp %0d", busy_count, exp_busy); end
    if (exp_busy == 0 || exp_events < 5) begin failures++; $display("weak stimulus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
