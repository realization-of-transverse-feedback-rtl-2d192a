// tb_tfs_module: the central unit fed with synthetic cluster traffic.
// The testbench plays two clusters of three devices: every 16 cycles each
// device sends a data frame with its compressed sample x(t) = c + t/4 (a
// ramp, which linear interpolation restores exactly) and a time tag; the
// frames of a cluster go out back to back on its link. FIR and notch stay
// at their pass-through reset state. Checks: every slot of the output
// vector holds the value of its selected device at (output time - slot
// delay); the kick equals the weighted sum; a time request is answered
// with the master time; a corrupted frame is counted and leaves a gap that
// invalidates the output for a while.
module tb_tfs_module;
  import tfs_pkg::*;
  import tb_link_pkg::*;
  localparam int NC = 2, NL = 3, NS = 6, R = 4, DLY = 100;
  logic clk = 0, rst = 1;
  logic [31:0] rx_data [NC];
  logic rx_valid [NC], rx_last [NC];
  logic [31:0] tx_data [NC];
  logic tx_valid [NC], tx_last [NC], tx_ready [NC];
  logic fir_we = 0;
  logic [4:0] fir_addr = '0;
  logic signed [17:0] fir_data = '0;
  logic [9:0] notch_n = 10'd8;
  logic signed [17:0] notch_coef [5];
  logic [2:0] slot_sel [NS];
  logic [9:0] slot_delay [NS];
  logic [NS-1:0] slots_activated = '1;
  logic signed [17:0] fb_coef [NS];
  logic fb_valid, fb_active, data_is_valid;
  sample_t fb_data;
  ts_t master_time;
  sample_t data_slot [NS];
  logic [15:0] crc_err_cnt [NC], lost_cnt [NC], tu_cnt [NC], sup_cnt [NC], gap_cnt [NC*NL], invalid_cnt;
  logic [15:0] late_cnt;
  ts_t fb_ts;
  int checks = 0, failures = 0;

  tfs_module dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t xval(int stream, ts_t t);
    return sample_t'(stream * 1500 - 4000 + int'(t / 4));
  endfunction

  // cluster traffic generators
  bit corrupt = 0, send_tr = 0;
  for (genvar c = 0; c < NC; c++) begin : g_gen
    initial begin
      logic [15:0] seq;
      seq = 0;
      rx_valid[c] = 0; rx_last[c] = 0; rx_data[c] = '0; tx_ready[c] = 1;
      @(negedge clk);
      while (rst) @(negedge clk);
      forever begin
        ts_t t;
        while (master_time % (1 << R) != 0) @(negedge clk);
        t = master_time;
        for (int d = 0; d < NL; d++) begin
          words_t w;
          w = make_frame(4'h1, 4'(d), 4'(R), seq, t, xval(c * NL + d, t));
          seq++;
          if (corrupt && c == 1 && d == 2) begin w[2][0] = !w[2][0]; end
          for (int i = 0; i < 4; i++) begin
            rx_data[c] = w[i]; rx_valid[c] = 1; rx_last[c] = (i == 3);
            @(negedge clk);
          end
        end
        if (send_tr && c == 0) begin
          words_t w;
          w = make_frame(4'h2, 4'h0, 4'h0, 16'h0, 32'h0, 16'h0);
          for (int i = 0; i < 4; i++) begin
            rx_data[c] = w[i]; rx_valid[c] = 1; rx_last[c] = (i == 3);
            @(negedge clk);
          end
          tr_end_time = master_time;   // the TR completes in this cycle
        end
        rx_valid[c] = 0; rx_last[c] = 0;
        @(negedge clk);
      end
    end
  end

  // TU monitor on cluster 0
  int n_tu = 0;
  words_t tw;
  int twi = 0;
  ts_t tr_end_time;
  always @(posedge clk) begin
    if (!rst && tx_valid[0] && tx_ready[0]) begin
      tw[twi] = tx_data[0];
      if (twi == 3) begin
        twi = 0;
        n_tu++;
        check(frame_crc_ok(tw) && tw[0][31:28] == 4'h3, "TU frame");
        check(tw[1] == tr_end_time, $sformatf("TU time %0d expected %0d", tw[1], tr_end_time));
      end else twi++;
    end
  end

  // output checks
  bit checking = 0, exp_valid = 1;
  int n_ok = 0, n_inv = 0;
  always @(negedge clk) if (checking && fb_valid) begin
    ts_t tout;
    longint acc, e;
    tout = master_time - 2;
    if (exp_valid) begin
      check(data_is_valid, $sformatf("valid at %0d", tout));
      for (int s = 0; s < NS; s++)
        check(data_slot[s] == xval(int'(slot_sel[s]), tout - 32'(slot_delay[s])),
              $sformatf("mt %0d slot %0d t %0d %0d expected %0d", master_time, s, (tout - 32'(slot_delay[s])) % 16, data_slot[s], xval(int'(slot_sel[s]), tout - 32'(slot_delay[s]))));
    end
    if (data_is_valid) n_ok++; else n_inv++;
    acc = 0;
    for (int s = 0; s < NS; s++) acc += longint'(fb_coef[s]) * longint'(prev_slot[s]);
    e = acc >>> 15;
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    check(longint'(fb_data) == e, "kick is the weighted sum");
  end
  sample_t prev_slot [NS];
  always @(posedge clk) prev_slot <= data_slot;

  initial begin
    for (int i = 0; i < 5; i++) notch_coef[i] = '0;
    slot_sel = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5};
    for (int s = 0; s < NS; s++) slot_delay[s] = 10'(DLY + 3 * s);
    fb_coef = '{18'sd8000, -18'sd5000, 18'sd3000, 18'sd16384, -18'sd9000, 18'sd1200};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (1300) @(negedge clk);
    checking = 1;
    repeat (600) @(negedge clk);
    // slot reassignment: one device in two slots with different delays
    checking = 0;
    slot_sel[5] = 3'd1; slot_delay[5] = 10'd150;
    repeat (200) @(negedge clk);   // the old stream's data leaves the slot
    checking = 1;
    repeat (600) @(negedge clk);
    // time request
    send_tr = 1;
    wait (n_tu == 1);
    send_tr = 0;
    check(tu_cnt[0] == 1, "TR answered");
    // corrupted frame: gap on stream 5
    checking = 0;
    slot_sel[5] = 3'd5; slot_delay[5] = 10'(DLY + 15);
    repeat (200) @(negedge clk);
    begin
      logic [15:0] inv0;
      inv0 = invalid_cnt;
      checking = 0;
      corrupt = 1;
      repeat (16) @(negedge clk);
      corrupt = 0;
      repeat (300) @(negedge clk);
      check(crc_err_cnt[1] >= 1, "checksum error counted");
      check(lost_cnt[1] >= 1, "lost frame seen in the sequence numbers");
      check(gap_cnt[5] >= 1, "interpolation gap on the stream");
      check(invalid_cnt - inv0 >= 16, $sformatf("output invalidated %0d cycles", invalid_cnt - inv0));
      check(crc_err_cnt[0] == 0 && gap_cnt[3] == 0, "other link and other devices clean");
    end
    checking = 1;
    repeat (200) @(negedge clk);
    check(n_ok > 1000, $sformatf("valid outputs %0d", n_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
