// tb_sync_ram_wrapper: timestamp-addressed storage and invalidation.
// After the clearing sweep, a stream with one sample per clock is written
// (with a gap); reading at t_read = now - D must return each sample with
// valid one cycle later, invalid inside the gap, invalid for times not yet
// written, and invalid for data left from the previous pass through the
// address space.
module tb_sync_ram_wrapper;
  import tfs_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst = 1, wr_valid = 0, rd_valid, init;
  smp_t wr_smp = '0;
  ts_t t_read = '0, t_newest;
  sample_t rd_data;
  int checks = 0, failures = 0;

  sync_ram_wrapper #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t val(ts_t t);
    return sample_t'(t * 7 + 3);
  endfunction

  initial begin
    ts_t now;
    logic exp_v;
    sample_t exp_d;
    int nvalid, ninvalid;
    nvalid = 0; ninvalid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(init, "clearing sweep after reset");
    while (init) @(negedge clk);
    now = 32'd1000;
    exp_v = 0; exp_d = '0;
    for (int k = 0; k < 300; k++) begin
      bit in_gap;
      // write the sample of time now, unless in the gap
      in_gap = (now >= 1100 && now < 1110);
      wr_valid = !in_gap && now < 1250;
      wr_smp.src = 0; wr_smp.rate = 0; wr_smp.ts = now; wr_smp.data = val(now);
      t_read = now - 32'd10;
      @(negedge clk);
      exp_v = (t_read >= 1000) && !(t_read >= 1100 && t_read < 1110) && (t_read < 1250);
      exp_d = val(t_read);
      check(rd_valid == exp_v, $sformatf("valid at read %0d", t_read));
      if (exp_v) check(rd_data == exp_d, $sformatf("data %h exp %h at %0d", rd_data, exp_d, t_read));
      if (rd_valid) nvalid++; else ninvalid++;
      if (wr_valid) check(t_newest == now, "newest time");
      now++;
    end
    check(nvalid > 200 && ninvalid >= 20, "both valid and invalid reads seen");
    // old wraparound: the address of 1240 is reused by 1240 + 64*k; reading a
    // time one pass later must be invalid although the address holds data
    wr_valid = 0;
    t_read = 32'd1240 + 32'(1 << AW);
    @(negedge clk);
    @(negedge clk);
    check(!rd_valid, "data of an older pass is invalid");
    t_read = 32'd1240;
    @(negedge clk);
    @(negedge clk);
    check(rd_valid && rd_data == val(1240), "current pass still readable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
