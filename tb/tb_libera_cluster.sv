// tb_libera_cluster: a cluster talking to a central-unit link end.
// Three devices with constant (per device different) delta signals feed
// the cluster; its link goes through a behavioural channel (20 cycles each
// way) to an aurora_core acting as time master. Checks: the slave time
// equals the master time after synchronization; every received data
// frame carries the block average of its device, a time tag not later
// than the master time, and all three source IDs show up at the expected
// rate; a compression rate too high for the link bandwidth makes the
// cluster drop samples (ovf_cnt) and the rate switch back recovers. The
// measured round-trip time must match the two channel delays.
module tb_libera_cluster;
  import tfs_pkg::*;
  localparam int NLIB = 3;
  logic clk = 0, rst = 1;
  sample_t delta [NLIB];
  logic [3:0] rate_log2 = 4'd4;
  logic [31:0] l_tx_data, l_rx_data, c_tx_data, c_rx_data;
  logic l_tx_valid, l_tx_last, l_tx_ready, l_rx_valid, l_rx_last;
  logic c_tx_valid, c_tx_last, c_tx_ready, c_rx_valid, c_rx_last;
  ts_t slave_time, master_time;
  logic synced;
  ts_t rtt;
  logic [15:0] retry_cnt;
  logic [15:0] ovf_cnt, lib_crc, crc_err_cnt, frm_cnt, tu_cnt, sup_cnt;
  logic frm_valid;
  frame_t frm;
  int checks = 0, failures = 0;
  int per_src [NLIB];

  libera_cluster #(.NLIB(NLIB), .SYNC_PERIOD(1000), .TIMEOUT(200)) dut (
    .clk, .rst, .delta, .rate_log2,
    .tx_data(l_tx_data), .tx_valid(l_tx_valid), .tx_last(l_tx_last), .tx_ready(l_tx_ready),
    .rx_data(l_rx_data), .rx_valid(l_rx_valid), .rx_last(l_rx_last),
    .slave_time, .synced, .ovf_cnt, .crc_err_cnt(lib_crc), .rtt, .retry_cnt
  );

  tb_channel #(.DELAY(20)) up (.clk, .in_data(l_tx_data), .in_valid(l_tx_valid), .in_last(l_tx_last),
    .in_ready(l_tx_ready), .out_data(c_rx_data), .out_valid(c_rx_valid), .out_last(c_rx_last),
    .flip(1'b0), .stall(1'b0));
  tb_channel #(.DELAY(20)) down (.clk, .in_data(c_tx_data), .in_valid(c_tx_valid), .in_last(c_tx_last),
    .in_ready(c_tx_ready), .out_data(l_rx_data), .out_valid(l_rx_valid), .out_last(l_rx_last),
    .flip(1'b0), .stall(1'b0));

  time_counter #(.TS_W(32)) u_mt (.clk, .rst(1'b0), .load(rst), .load_val(32'h0100_0000), .time_o(master_time));

  aurora_core u_cu (.clk, .rst, .master_time,
    .rx_data(c_rx_data), .rx_valid(c_rx_valid), .rx_last(c_rx_last),
    .tx_data(c_tx_data), .tx_valid(c_tx_valid), .tx_last(c_tx_last), .tx_ready(c_tx_ready),
    .frm_valid, .frm, .crc_err_cnt, .frm_cnt, .tu_cnt, .sup_cnt);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit check_data = 0;
  always @(negedge clk) if (check_data && frm_valid) begin
    check(int'(frm.src) < NLIB, "source id");
    if (int'(frm.src) < NLIB) begin
      per_src[frm.src]++;
      check(frm.data == delta[frm.src], $sformatf("src %0d value %0d expected %0d", frm.src, frm.data, delta[frm.src]));
      check(frm.ts < master_time && master_time - frm.ts < 100, "time tag close behind master time");
      check(frm.rate == rate_log2, "rate field");
    end
  end

  initial begin
    for (int i = 0; i < NLIB; i++) begin delta[i] = sample_t'(100 * (i + 1) - 250); per_src[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    wait (synced);
    @(negedge clk);
    check(slave_time == master_time, $sformatf("synchronized: slave %0d master %0d", slave_time, master_time));
    // round trip: two 20-cycle channels plus one frame (4 words) each way
    // and the receive stacks' registers
    $display("measured round-trip time: %0d cycles, retries %0d, tu %0d sup %0d crc %0d/%0d at %0t", rtt, retry_cnt, tu_cnt, sup_cnt, lib_crc, crc_err_cnt, $time);
    check(rtt >= 40 && rtt <= 60, $sformatf("round-trip time %0d", rtt));
    check(retry_cnt == 0, "no retry on a quiet link");
    repeat (100) @(negedge clk);
    check_data = 1;
    repeat (1600) @(negedge clk);
    check_data = 0;
    for (int i = 0; i < NLIB; i++)
      check(per_src[i] >= 1600 / 16 - 3 && per_src[i] <= 1600 / 16 + 3, $sformatf("rate of source %0d: %0d", i, per_src[i]));
    check(ovf_cnt == 0, "no overflow at rate 16");
    check(tu_cnt >= 2, "periodic resynchronization");
    check(slave_time == master_time, "still synchronized");
    // too little compression: 3 devices x 4 words > 8 cycles
    rate_log2 = 4'd3;
    repeat (2000) @(negedge clk);
    check(ovf_cnt > 0, "overflow when the link is too slow");
    rate_log2 = 4'd5;
    repeat (500) @(negedge clk);
    begin
      logic [15:0] o;
      o = ovf_cnt;
      repeat (1000) @(negedge clk);
      check(ovf_cnt == o, "no further overflow at rate 32");
    end
    check(slave_time == master_time, "synchronized at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
