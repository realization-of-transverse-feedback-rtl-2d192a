// tb_tup_slave: synchronization of a slave counter to a master counter.
// The testbench plays the channel and the master: a TR leaves when the
// slave fires it, reaches the master LAT cycles later, is answered at once
// with the master time and reaches the slave LAT cycles later. After each
// update the slave counter must equal the master counter (cycle accuracy
// for an even RTT), and stay equal every cycle from then on, across
// updates over random latencies. Suppressed answers must lead to a retry
// after TIMEOUT.
module tb_tup_slave;
  localparam int PERIOD = 200, TOUT = 64;
  logic clk = 0, rst = 1, link_idle = 1;
  logic [31:0] slave_time, master_time = 32'h7000_0000;
  logic tr_valid, tr_fire, tu_rcvd = 0, load, synced;
  logic [31:0] tu_time = '0, load_val, rtt;
  logic [15:0] retry_cnt;
  int checks = 0, failures = 0;
  int lat = 9;
  bit drop_next = 0;
  int updates = 0;

  assign tr_fire = tr_valid;   // the stack starts the TR in the same cycle

  tup_slave #(.TS_W(32), .SYNC_PERIOD(PERIOD), .TIMEOUT(TOUT)) dut (.*);
  time_counter #(.TS_W(32)) u_tc (.clk, .rst, .load, .load_val, .time_o(slave_time));

  always #5 clk = ~clk;
  always @(posedge clk) master_time <= master_time + 1;

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

  // channel + master: answer LAT cycles after the TR, arrive LAT cycles later
  always @(negedge clk) if (!rst && tr_fire) begin
    fork
      begin
        logic [31:0] t3;
        bit drop;
        drop = drop_next;
        drop_next = 0;
        repeat (lat) @(negedge clk);
        t3 = master_time;
        if (!drop) begin
          repeat (lat) @(negedge clk);
          tu_time = t3; tu_rcvd = 1;
          @(negedge clk);
          tu_rcvd = 0;
          check(slave_time == master_time,
                $sformatf("slave %0d master %0d after update", slave_time, master_time));
          check(rtt == 32'(2 * lat), "measured RTT");
          updates++;
        end
      end
    join_none
  end

  // once synchronized, the two counters (same clock) never differ
  always @(negedge clk) if (!rst && updates > 0) begin
    check(slave_time == master_time, "slave follows master every cycle");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // first sync right after reset; busy link delays the TR
    link_idle = 0;
    repeat (20) @(negedge clk);
    check(!tr_fire, "TR waits while the link is busy");
    link_idle = 1;
    wait (updates == 1);
    check(synced, "synced after first update");
    // change the latency; next period resync
    lat = 30;
    wait (updates == 2);
    // a suppressed answer: slave must retry
    drop_next = 1;
    wait (retry_cnt == 1);
    wait (updates == 3);
    check(retry_cnt == 1, "one retry");
    repeat (50) @(negedge clk);
    check(slave_time == master_time, "counters stay together");
    // further updates over random link latencies (round trip below TIMEOUT)
    for (int k = 0; k < 12; k++) begin
      int u;
      u = updates;
      lat = 1 + int'($urandom % (TOUT / 2 - 2));
      wait (updates == u + 1);
    end
    check(retry_cnt == 1, "no retry without a suppressed answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
