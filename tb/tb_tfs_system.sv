// tb_tfs_system: the whole system end to end, at its default size.
// Two clusters of three Libera devices talk through behavioural links
// (40 cycles each way) to the central unit. Each device sees a constant
// delta signal (one value per device, changed once as a step). The run
// goes through: time synchronization of both clusters, realigned slot
// values and kick checked every cycle, a run-time FIR coefficient update,
// a step whose latency to the kick is measured, a bit error on a link
// (checksum error, lost frame, interpolation gap, invalid output), a
// suppressed time update with retry while the central unit's link is not
// ready, a compression rate switch, a rate too high for the link (cluster
// overflow), a slot delay too short for the transport time (late reads,
// output invalid) and the notch filter removing the constant offset. The
// kick's timestamp is checked against the master time, and the measured
// link round-trip time against the channel delays. Every
// mechanism is counted and a failure is recorded for one that never
// happened.
module tb_tfs_system;
  import tfs_pkg::*;
  localparam int NC = 2, NL = 3, NS = 6, DLY = 200, LAT = 40;
  logic clk = 0, rst = 1;
  sample_t delta [NC][NL];
  logic [3:0] rate_log2 = 4'd4;
  logic [31:0] lib_tx_data [NC], lib_rx_data [NC], cu_rx_data [NC], cu_tx_data [NC];
  logic lib_tx_valid [NC], lib_tx_last [NC], lib_tx_ready [NC];
  logic lib_rx_valid [NC], lib_rx_last [NC];
  logic cu_rx_valid [NC], cu_rx_last [NC];
  logic cu_tx_valid [NC], cu_tx_last [NC], cu_tx_ready [NC], cu_ch_ready [NC];
  logic fir_we = 0;
  logic [4:0] fir_addr = '0;
  logic signed [17:0] fir_data = '0;
  logic [9:0] notch_n = 10'd4;
  logic signed [17:0] notch_coef [5];
  logic [2:0] slot_sel [NS];
  logic [9:0] slot_delay [NS];
  logic [NS-1:0] slots_activated = '1;
  logic signed [17:0] fb_coef [NS];
  logic fb_valid, fb_active, data_is_valid;
  sample_t fb_data;
  ts_t master_time;
  ts_t slave_time [NC];
  logic synced [NC];
  logic [15:0] lib_ovf_cnt [NC];
  sample_t data_slot [NS];
  logic [15:0] crc_err_cnt [NC], lost_cnt [NC], tu_cnt [NC], sup_cnt [NC], gap_cnt [NC*NL], invalid_cnt;
  logic [15:0] lib_crc_err_cnt [NC], late_cnt, lib_retry_cnt [NC];
  ts_t lib_rtt [NC];
  ts_t fb_ts;
  logic flip [NC];
  bit cu_block = 0;
  int checks = 0, failures = 0;

  tfs_system dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_link
    tb_channel #(.DELAY(LAT)) up (.clk, .in_data(lib_tx_data[c]), .in_valid(lib_tx_valid[c]),
      .in_last(lib_tx_last[c]), .in_ready(lib_tx_ready[c]), .out_data(cu_rx_data[c]),
      .out_valid(cu_rx_valid[c]), .out_last(cu_rx_last[c]), .flip(flip[c]), .stall(1'b0));
    tb_channel #(.DELAY(LAT)) down (.clk, .in_data(cu_tx_data[c]), .in_valid(cu_tx_valid[c]),
      .in_last(cu_tx_last[c]), .in_ready(cu_ch_ready[c]), .out_data(lib_rx_data[c]),
      .out_valid(lib_rx_valid[c]), .out_last(lib_rx_last[c]), .flip(1'b0), .stall(1'b0));
    assign cu_tx_ready[c] = cu_ch_ready[c] && !cu_block;
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle checks of the realigned vector and the kick
  bit check_vals = 0, check_kick = 0;
  sample_t prev_slot [NS];
  int n_valid = 0;
  always @(negedge clk) if (!rst) begin
    if (check_vals) begin
      check(data_is_valid, "vector valid");
      for (int s = 0; s < NS; s++)
        check(data_slot[s] == delta[slot_sel[s] / NL][slot_sel[s] % NL],
              $sformatf("slot %0d = %0d, expected %0d", s, data_slot[s], delta[slot_sel[s] / NL][slot_sel[s] % NL]));
    end
    if (check_kick && fb_valid) begin
      longint acc;
      acc = 0;
      for (int s = 0; s < NS; s++) acc += longint'(fb_coef[s]) * longint'(prev_slot[s]);
      acc = acc >>> 15;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      check(longint'(fb_data) == acc, "kick = weighted sum of the slots");
      // vector read at master time T is presented at T+2, the kick at T+3
      check(fb_ts == master_time - 32'd3, $sformatf("kick timestamp %0d at master time %0d", fb_ts, master_time));
    end
    if (data_is_valid) n_valid++;
  end
  always @(posedge clk) prev_slot <= data_slot;

  task automatic set_deltas(int base);
    for (int c = 0; c < NC; c++)
      for (int d = 0; d < NL; d++) delta[c][d] = sample_t'(base + 700 * (c * NL + d) - 1800);
  endtask

  task automatic both_synced_check(string when);
    for (int c = 0; c < NC; c++) begin
      longint diff;
      diff = longint'(slave_time[c]) - longint'(master_time);
      check(diff >= -1 && diff <= 1, $sformatf("%s: cluster %0d time off by %0d", when, c, diff));
    end
  endtask

  int n_sync = 0, n_suppress = 0, n_crc = 0, n_lost = 0, n_gap = 0, n_invalid = 0;
  int n_late = 0, n_retry = 0;
  int n_ovf = 0, n_rate_switch = 0, n_coef_update = 0, n_notch = 0, n_step = 0;

  initial begin
    int t0, lat;
    logic [15:0] inv0, tu0, crc0, late0;
    set_deltas(0);
    for (int c = 0; c < NC; c++) flip[c] = 0;
    for (int i = 0; i < 5; i++) notch_coef[i] = '0;
    for (int s = 0; s < NS; s++) begin slot_sel[s] = 3'(s); slot_delay[s] = 10'(DLY); end
    fb_coef = '{18'sd6000, -18'sd4000, 18'sd2500, 18'sd9000, -18'sd7000, 18'sd1500};
    repeat (3) @(negedge clk);
    rst = 0;

    // time synchronization
    wait (synced[0] && synced[1]);
    @(negedge clk);
    both_synced_check("after first sync");
    for (int c = 0; c < NC; c++) begin
      $display("cluster %0d round-trip time: %0d cycles", c, lib_rtt[c]);
      check(lib_rtt[c] >= 2 * LAT && lib_rtt[c] <= 2 * LAT + 20, "round-trip time matches the link delays");
    end
    n_sync = int'(tu_cnt[0]) + int'(tu_cnt[1]);
    // the realignment memories clear themselves for 1024 cycles after reset
    repeat (1300) @(negedge clk);
    check_vals = 1; check_kick = 1;
    repeat (1500) @(negedge clk);

    // FIR: 4-tap moving average written while running
    check_vals = 0;
    for (int i = 0; i < 4; i++) begin
      fir_addr = 5'(i); fir_data = 18'sd16384; fir_we = 1; @(negedge clk);
    end
    fir_we = 0;
    n_coef_update++;
    repeat (DLY + 100) @(negedge clk);
    check_vals = 1;
    repeat (800) @(negedge clk);

    // step on all devices, latency from input to the kick
    check_vals = 0;
    begin
      sample_t k0;
      k0 = fb_data;
      set_deltas(1000);
      t0 = int'(master_time);
      while (fb_data == k0) @(negedge clk);
      lat = int'(master_time) - t0;
      n_step++;
      $display("step latency (delta input to kick): %0d cycles, slot delay %0d", lat, DLY);
      // the interpolated ramp toward the new value starts at the previous
      // compressed sample, up to one compression block before the step
      check(lat >= DLY - 16 && lat <= DLY + 20, "step latency set by the slot delay");
    end
    repeat (DLY + 100) @(negedge clk);
    check_vals = 1;
    repeat (500) @(negedge clk);

    // bit error on the uplink of cluster 1
    check_vals = 0;
    inv0 = invalid_cnt;
    crc0 = crc_err_cnt[0];
    flip[1] = 1; @(negedge clk); flip[1] = 0;
    repeat (DLY + 200) @(negedge clk);
    n_crc = crc_err_cnt[1];
    n_lost = lost_cnt[1];
    for (int i = 0; i < NC * NL; i++) n_gap += gap_cnt[i];
    n_invalid = invalid_cnt - inv0;
    check(crc_err_cnt[0] == crc0, "other link clean");
    check_vals = 1;
    repeat (300) @(negedge clk);

    // suppressed time update: the central unit's link is not ready while
    // the next requests arrive; the clusters retry
    check_vals = 0; check_kick = 0;
    tu0 = tu_cnt[0];
    cu_block = 1;
    wait (sup_cnt[0] > 0 || sup_cnt[1] > 0);
    repeat (100) @(negedge clk);
    cu_block = 0;
    n_suppress = int'(sup_cnt[0]) + int'(sup_cnt[1]);
    wait (tu_cnt[0] > tu0);
    repeat (100) @(negedge clk);
    both_synced_check("after retry");
    check_vals = 1; check_kick = 1;
    repeat (300) @(negedge clk);

    // compression switch 16 -> 32
    check_vals = 0;
    rate_log2 = 4'd5; n_rate_switch++;
    repeat (DLY + 200) @(negedge clk);
    check_vals = 1;
    repeat (600) @(negedge clk);

    // too little compression for the link: overflow in the clusters
    check_vals = 0;
    rate_log2 = 4'd3; n_rate_switch++;
    repeat (600) @(negedge clk);
    n_ovf = int'(lib_ovf_cnt[0]) + int'(lib_ovf_cnt[1]);
    rate_log2 = 4'd4; n_rate_switch++;
    repeat (DLY + 300) @(negedge clk);
    check_vals = 1;
    repeat (400) @(negedge clk);

    // slot 2 delay shorter than the transport time: late reads, vector
    // invalid until the delay is restored
    check_vals = 0;
    late0 = late_cnt;
    slot_delay[2] = 10'd30;
    repeat (100) @(negedge clk);
    check(!data_is_valid && data_slot[0] == 0, "vector zeroed while a slot reads too early");
    n_late = int'(late_cnt - late0);
    check(n_late >= 95, $sformatf("late reads counted: %0d", n_late));
    slot_delay[2] = 10'(DLY);
    repeat (10) @(negedge clk);
    check_vals = 1;
    repeat (300) @(negedge clk);

    // notch: DC estimator y = x/64 + 63/64 y[t-n] removes the constant values
    check_vals = 0;
    notch_coef[0] = 18'sd512; notch_coef[3] = -18'sd32256; n_notch++;
    repeat (6000) @(negedge clk);
    for (int s = 0; s < NS; s++)
      check(data_slot[s] > -200 && data_slot[s] < 200, $sformatf("slot %0d offset removed: %0d", s, data_slot[s]));
    both_synced_check("at the end");
    for (int c = 0; c < NC; c++) check(lib_crc_err_cnt[c] == 0, "downlinks clean");
    n_sync = int'(tu_cnt[0]) + int'(tu_cnt[1]);
    n_retry = int'(lib_retry_cnt[0]) + int'(lib_retry_cnt[1]);

    $display("mechanisms: sync %0d suppress %0d retry %0d crc %0d lost %0d gap %0d invalid %0d late %0d ovf %0d rate %0d coef %0d notch %0d step %0d",
             n_sync, n_suppress, n_retry, n_crc, n_lost, n_gap, n_invalid, n_late, n_ovf, n_rate_switch, n_coef_update, n_notch, n_step);
    check(n_sync >= 4, "time synchronization happened");
    check(n_suppress > 0, "time update suppression happened");
    check(n_retry > 0, "time request retry happened");
    check(n_crc > 0, "checksum error detected");
    check(n_lost > 0, "lost frame detected");
    check(n_gap > 0, "interpolation gap happened");
    check(n_invalid > 0, "invalid output vector happened");
    check(n_late > 0, "late read happened");
    check(n_ovf > 0, "cluster overflow happened");
    check(n_rate_switch > 0 && n_coef_update > 0 && n_notch > 0 && n_step > 0, "mode switches happened");
    check(n_valid > 3000, "valid output vectors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
