// tb_dtc_data_in_ctrl: feeds the DTC frame checker with words spaced like the
// 200 Mb/s line (one per 8 clocks): good frames of 0..4 data words with random
// identifiers, and damaged ones (wrong trailer, length above the maximum,
// stray word between frames, wrong CRC). Good frames must come out once with
// the right identifier, length and data; damaged ones must be counted and
// give a resync pulse. One instance without and one with the CRC word.
`timescale 1ns/1ps
module tb_dtc_data_in_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        w_valid;
  logic [15:0] w_data;
  logic        fv [2], rs [2];
  logic [3:0]  fid [2];
  logic [11:0] flen [2];
  logic [15:0] fdata0 [4], fdata1 [4];
  logic [31:0] ok [2], err [2];
  int          sel;   // which instance gets the words

  dtc_data_in_ctrl #(.MAX_LEN(4), .CRC_EN(1'b0)) dut0 (
    .clk, .rst_n, .w_valid(w_valid && sel == 0), .w_data, .frame_valid(fv[0]), .frame_id(fid[0]),
    .frame_len(flen[0]), .frame_data(fdata0), .resync(rs[0]), .frames_ok(ok[0]), .frame_errors(err[0]));
  dtc_data_in_ctrl #(.MAX_LEN(4), .CRC_EN(1'b1)) dut1 (
    .clk, .rst_n, .w_valid(w_valid && sel == 1), .w_data, .frame_valid(fv[1]), .frame_id(fid[1]),
    .frame_len(flen[1]), .frame_data(fdata1), .resync(rs[1]), .frames_ok(ok[1]), .frame_errors(err[1]));

  function automatic logic [15:0] ref_crc(input logic [15:0] words [$]);
    logic [15:0] r = 16'hFFFF;
    foreach (words[w]) for (int b = 15; b >= 0; b--) begin
      logic fb;
      fb = r[15] ^ words[w][b];
      r = r << 1;
      if (fb) r ^= 16'h1021;
    end
    return r;
  endfunction

  task automatic word(input logic [15:0] w);
    w_valid <= 1; w_data <= w;
    @(posedge clk);
    w_valid <= 0;
    repeat (7) @(posedge clk);
  endtask

  // expected good frames
  typedef struct { logic [3:0] id; int len; logic [15:0] d [4]; } frm_t;
  frm_t expq [2][$];
  int n_err [2], n_rs [2], n_ok [2];

  for (genvar k = 0; k < 2; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (rs[k]) n_rs[k]++;
      if (fv[k]) begin
        checks++;
        if (expq[k].size() == 0) begin failures++; $display("k%0d unexpected frame", k); end
        else begin
          frm_t e;
          e = expq[k].pop_front();
          if (fid[k] !== e.id || int'(flen[k]) != e.len) begin
            failures++; $display("k%0d id/len %h/%0d exp %h/%0d", k, fid[k], flen[k], e.id, e.len);
          end
          for (int i = 0; i < e.len; i++) begin
            logic [15:0] got;
            got = (k == 0) ? fdata0[i] : fdata1[i];
            checks++;
            if (got !== e.d[i]) begin failures++; $display("k%0d data[%0d] %h exp %h", k, i, got, e.d[i]); end
          end
        end
      end
    end
  end

  task automatic frame(input int k, input bit good, input int kind);
    frm_t f;
    logic [15:0] cw [$];
    f.id  = 4'($urandom);
    f.len = $urandom % 5;
    for (int i = 0; i < 4; i++) f.d[i] = 16'($urandom);
    if (!good && kind == 1) f.len = 5 + $urandom % 100;   // too long
    cw.push_back({f.id, 12'(f.len)});
    for (int i = 0; i < f.len && i < 4; i++) cw.push_back(f.d[i]);
    for (int i = 0; i < 3; i++) word(16'h0000);
    if (!good && kind == 2) begin word(16'h1234); n_err[k]++; return; end  // stray word
    word(16'hA55A);
    if (!good && kind == 1) begin word(cw[0]); n_err[k]++; return; end
    foreach (cw[i]) word(cw[i]);
    if (k == 1) word((!good && kind == 3) ? ~ref_crc(cw) : ref_crc(cw));
    if (!good && kind == 3) begin n_err[k]++; return; end
    if (good) begin expq[k].push_back(f); n_ok[k]++; end
    else n_err[k]++;
    word((!good && kind == 0) ? 16'h5AA4 : 16'h5AA5);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_valid = 0; w_data = 0; sel = 0;
    for (int k = 0; k < 2; k++) begin n_err[k] = 0; n_rs[k] = 0; n_ok[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      sel = k;
      for (int f = 0; f < 60; f++) begin
        int r;
        r = $urandom % 10;
        if (r < 7) frame(k, 1, 0);
        else frame(k, 0, (k == 1) ? (r - 7) + 1 : (r - 7));
      end
      repeat (20) @(posedge clk);
      checks += 3;
      if (ok[k] != 32'(n_ok[k]))  begin failures++; $display("k%0d ok %0d exp %0d", k, ok[k], n_ok[k]); end
      if (err[k] != 32'(n_err[k])) begin failures++; $display("k%0d err %0d exp %0d", k, err[k], n_err[k]); end
      if (n_rs[k] != n_err[k])     begin failures++; $display("k%0d resync %0d exp %0d", k, n_rs[k], n_err[k]); end
      checks++;
      if (expq[k].size() != 0) begin failures++; $display("k%0d frames missing", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
