// tb_interpolator: linear interpolation back to one sample per clock.
// Compressed samples (random values, time tags 2^r apart) arrive every
// 2^r cycles with random jitter. Every output sample must carry the next
// time tag without a hole and the value x(k-1) + ((x(k)-x(k-1))*j) >>> r.
// A dropped sample must produce a gap (no output for its span, gap_cnt).
module tb_interpolator;
  import tfs_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  smp_t in_smp = '0, out_smp;
  logic [15:0] gap_cnt, ovf_cnt;
  int checks = 0, failures = 0;
  smp_t exp_q[$];

  interpolator #(.FIFO_DEPTH(4), .MAX_RATE_LOG2(7)) dut (.*);
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

  int nout = 0;
  always @(negedge clk) if (!rst && out_valid) begin
    smp_t e;
    nout++;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front();
      check(out_smp.ts == e.ts && out_smp.data == e.data && out_smp.src == e.src,
            $sformatf("ts %0d/%0d data %0d/%0d", out_smp.ts, e.ts, out_smp.data, e.data));
    end
  end

  // expected segment between two samples
  task automatic expect_segment(smp_t a, smp_t b);
    int d;
    d = 1 << b.rate;
    for (int j = 0; j < d; j++) begin
      smp_t e;
      longint diff;
      diff = longint'(b.data) - longint'(a.data);
      e = a;
      e.ts = a.ts + 32'(j);
      e.data = sample_t'(longint'(a.data) + ((diff * j) >>> b.rate));
      exp_q.push_back(e);
    end
  endtask

  initial begin
    smp_t prev, s;
    ts_t t;
    int r;
    t = 32'h0000_1000;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int phase = 0; phase < 3; phase++) begin
      r = (phase == 0) ? 3 : (phase == 1 ? 5 : 2);
      for (int n = 0; n < 60; n++) begin
        if (!(phase == 0 && n == 0)) t += 32'(1 << r);
        s.src = 4'd2; s.rate = 4'(r); s.ts = t; s.data = sample_t'($urandom);
        if (phase == 2 && n == 30) begin
          // this sample is lost on the link: skip it
          repeat (1 << r) @(negedge clk);
          continue;
        end
        if (!(phase == 0 && n == 0) && !(phase == 2 && n == 31)) expect_segment(prev, s);
        in_smp = s; in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        repeat ((1 << r) - 1 - (($urandom % 2) && n % 2 == 1 ? 1 : 0) + ((n % 2 == 0 && n > 0) ? 1 : 0)) @(negedge clk);
        prev = s;
      end
    end
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("all samples produced (%0d left)", exp_q.size()));
    check(gap_cnt == 1, "one gap");
    check(ovf_cnt == 0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
