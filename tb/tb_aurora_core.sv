// tb_aurora_core: central-unit link end.
// The testbench sends data frames and time requests (TR) on the receive
// stream. Data frames must come out unchanged; a TR must be answered by a
// TU whose time equals the master time at the cycle the TR completed, with
// a correct checksum; with the transmit side not ready the TU must be
// suppressed (sup_cnt) and the next TR answered. A corrupted frame must be
// counted, not passed.
module tb_aurora_core;
  import tfs_pkg::*;
  import tb_link_pkg::*;
  logic clk = 0, rst = 1;
  ts_t master_time = 32'd100;
  logic [31:0] rx_data = '0, tx_data;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_last, tx_ready = 1;
  logic frm_valid;
  frame_t frm;
  logic [15:0] crc_err_cnt, frm_cnt, tu_cnt, sup_cnt;
  int checks = 0, failures = 0;
  int n_data_out = 0, n_tu = 0;
  ts_t tr_done_time[$];

  aurora_core dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) master_time <= master_time + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(words_t w);
    for (int i = 0; i < 4; i++) begin
      rx_data = w[i]; rx_valid = 1; rx_last = (i == 3);
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  // TU monitor
  words_t cur;
  int widx = 0;
  always @(posedge clk) if (!rst && tx_valid && tx_ready) begin
    cur[widx] = tx_data;
    if (widx == 3) begin
      check(frame_crc_ok(cur), "TU checksum");
      check(cur[0][31:28] == 4'h3, "TU type");
      if (tr_done_time.size() > 0)
        check(cur[1] == tr_done_time.pop_front(), "TU time = master time when TR completed");
      n_tu++;
      widx = 0;
    end else widx++;
  end


  always @(negedge clk) if (!rst && frm_valid) begin
    n_data_out++;
    check(frm.ftype == FT_DATA && frm.ts == 32'(n_data_out * 16) && frm.data == 16'(n_data_out), "data frame passed");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 1; n <= 20; n++) send(make_frame(4'h1, 4'h1, 4'h4, 16'(n), 32'(n * 16), 16'(n)));
    // TR answered
    for (int k = 0; k < 5; k++) begin
      send(make_frame(4'h2, 4'h0, 4'h0, 16'h0, 32'h0, 16'h0));
      tr_done_time.push_back(master_time);   // master time in the cycle after the last word
      repeat (10) @(negedge clk);
    end
    check(n_tu == 5 && tu_cnt == 5, "five TUs");
    // TR while transmit side not ready: suppressed
    tx_ready = 0;
    send(make_frame(4'h2, 4'h0, 4'h0, 16'h0, 32'h0, 16'h0));
    @(negedge clk);
    check(sup_cnt == 1 && tu_cnt == 5, "TU suppressed");
    tx_ready = 1;
    repeat (10) @(negedge clk);
    check(n_tu == 5, "no TU sent after suppression");
    send(make_frame(4'h2, 4'h0, 4'h0, 16'h0, 32'h0, 16'h0));
    tr_done_time.push_back(master_time);
    repeat (10) @(negedge clk);
    check(n_tu == 6 && tu_cnt == 6, "next TR answered");
    // corrupted frame
    begin
      words_t w;
      w = make_frame(4'h1, 4'h1, 4'h4, 16'd21, 32'd999, 16'd7);
      w[2][3] = !w[2][3];
      send(w);
    end
    repeat (3) @(negedge clk);
    check(crc_err_cnt == 1, "checksum error counted");
    check(n_data_out == 20, "bad frame not passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
