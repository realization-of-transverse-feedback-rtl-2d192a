// tb_tup_master: immediate answer, suppression and channel blocking.
module tb_tup_master;
  logic clk = 0, rst = 1, tr_rcvd = 0, link_idle = 1;
  logic [31:0] master_time = 32'd1000, tu_time;
  logic tu_valid, block;
  logic [15:0] tu_cnt, sup_cnt;
  int checks = 0, failures = 0;

  tup_master #(.TS_W(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) master_time <= master_time + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_tu, exp_sup;
    exp_tu = 0; exp_sup = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      bit idle;
      repeat ($urandom % 5) @(negedge clk);
      idle = ($urandom % 3) != 0;
      link_idle = idle; tr_rcvd = 1;
      #1;
      check(tu_valid == idle, "TU only when constraints hold");
      if (idle) check(tu_time == master_time, "TU carries the current master time (t2 = t3)");
      @(negedge clk);
      tr_rcvd = 0; link_idle = 1;
      #1;
      check(!tu_valid, "no TU without TR");
      check(block == !idle, "channel blocked after a suppressed TU");
      if (idle) exp_tu++; else exp_sup++;
    end
    check(tu_cnt == 16'(exp_tu) && sup_cnt == 16'(exp_sup), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
