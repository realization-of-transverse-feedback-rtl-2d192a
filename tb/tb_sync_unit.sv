// tb_sync_unit: realignment of several streams by time tag.
// Six streams deliver one sample per clock, each with its own transport
// lag (stream i lags i+3 cycles behind the master time) and a value that
// encodes stream and time tag. Slots select streams (one stream used
// twice with different delays). Every output vector with timestamp T must
// hold, for slot s, the value of stream sel[s] at time T - delay[s]; a
// stream that stops makes the whole vector zero and data_is_valid low
// while its slot is activated, and has no effect once deactivated. A slot
// delay shorter than the stream's lag makes every read late: the vector is
// zero and late_cnt counts each cycle.
module tb_sync_unit;
  import tfs_pkg::*;
  localparam int NIN = 6, NSLOT = 6, AW = 6;
  logic clk = 0, rst = 1;
  logic in_valid [NIN];
  smp_t in_smp [NIN];
  ts_t master_time;
  logic [2:0] slot_sel [NSLOT];
  logic [AW-1:0] slot_delay [NSLOT];
  logic [NSLOT-1:0] slots_activated = '1;
  logic out_valid, data_is_valid;
  sample_t data_slot [NSLOT];
  ts_t timestamp;
  ts_t t_newest [NSLOT];
  logic [15:0] invalid_cnt, late_cnt;
  int checks = 0, failures = 0;
  bit stop3 = 0, exp_stop = 0;

  sync_unit #(.NIN(NIN), .NSLOT(NSLOT), .AW(AW)) dut (.*);
  time_counter #(.TS_W(32)) u_mt (.clk, .rst(1'b0), .load(rst), .load_val(32'd500), .time_o(master_time));
  always #5 clk = ~clk;

  function automatic sample_t val(int i, ts_t t);
    return sample_t'(i * 4000 + int'(t % 1000));
  endfunction

  // streams: stream i delivers time master_time - (i+3)
  always @(negedge clk) begin
    for (int i = 0; i < NIN; i++) begin
      ts_t t;
      t = master_time - 32'(i + 3);
      in_valid[i] = !rst && !(stop3 && i == 3);
      in_smp[i] = {4'(i), 4'd0, t, val(i, t)};
    end
  end

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

  int nvalid = 0, nzero = 0;
  bit checking = 0;
  always @(negedge clk) if (checking && out_valid) begin
    logic all;
    all = 1;
    for (int s = 0; s < NSLOT; s++)
      if (slots_activated[s] && exp_stop && slot_sel[s] == 3) all = 0;
    check(data_is_valid == all, $sformatf("data_is_valid at %0d", timestamp));
    for (int s = 0; s < NSLOT; s++) begin
      sample_t e;
      e = (all && slots_activated[s]) ? val(int'(slot_sel[s]), timestamp - 32'(slot_delay[s])) : '0;
      check(data_slot[s] == e, $sformatf("slot %0d value %0d expected %0d", s, data_slot[s], e));
    end
    if (all) nvalid++; else nzero++;
  end

  initial begin
    slot_sel   = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd4};
    slot_delay = '{6'd12, 6'd12, 6'd15, 6'd20, 6'd12, 6'd30};
    repeat (3) @(negedge clk);
    rst = 0;
    repeat ((1 << AW) + 40) @(negedge clk);
    checking = 1;
    repeat (300) @(negedge clk);
    stop3 = 1;                  // stream 3 fails
    checking = 0;               // data already stored is still used
    repeat (40) @(negedge clk);
    exp_stop = 1;
    checking = 1;
    repeat (200) @(negedge clk);
    checking = 0;
    slots_activated = 6'b110111; // slot 3 deactivated
    @(negedge clk);
    checking = 1;
    repeat (200) @(negedge clk);
    // slot 0 delay 2 < lag 3 of stream 0: data never there in time
    begin
      logic [15:0] late0;
      int nlate;
      checking = 0;
      late0 = late_cnt;
      slot_delay[0] = 6'd2;
      repeat (3) @(negedge clk);
      nlate = 0;
      repeat (50) begin
        @(negedge clk);
        check(!data_is_valid && data_slot[1] == 0, "late slot zeroes the vector");
        nlate++;
      end
      check(late_cnt - late0 >= 16'(nlate), $sformatf("late reads %0d", late_cnt - late0));
      slot_delay[0] = 6'd12;
      repeat (3) @(negedge clk);
      checking = 1;
      repeat (50) @(negedge clk);
      check(late_cnt - late0 <= 16'(nlate + 4), "no late reads after the delay is restored");
    end
    check(nvalid > 400 && nzero > 150, $sformatf("valid %0d zeroed %0d", nvalid, nzero));
    check(invalid_cnt > 150, "invalid cycles counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
