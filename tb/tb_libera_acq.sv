// tb_libera_acq: compression (block average, down-sampling) and tagging.
// A reference model sums the same random delta samples in blocks of
// 2^rate (the first block after reset holds one sample, the rate being
// taken at each block start) and predicts value and time tag of every
// output; the output rate is checked by counting outputs. The rate is
// switched during the run.
module tb_libera_acq;
  import tfs_pkg::*;
  logic clk = 0, rst = 1;
  sample_t delta = '0;
  logic [3:0] rate_log2 = 4'd3;
  ts_t slave_time = 32'd5000;
  logic out_valid;
  smp_t out_smp;
  int checks = 0, failures = 0;

  libera_acq #(.MAX_RATE_LOG2(7), .SRC_ID(4'd5)) dut (.*);
  always #5 clk = ~clk;

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

  // model
  longint sum = 0;
  int cnt = 0, blen = 1, cur_rate = 0, nout = 0, nexp = 0;
  smp_t exp_q[$];

  always @(posedge clk) if (!rst) begin
    sum += longint'(delta);
    cnt++;
    if (cnt == blen) begin
      smp_t e;
      e.src = 4'd5; e.rate = 4'(cur_rate); e.ts = slave_time;
      e.data = sample_t'(sum >>> cur_rate);
      exp_q.push_back(e);
      nexp++;
      sum = 0; cnt = 0;
      cur_rate = int'(rate_log2 > 7 ? 7 : rate_log2);
      blen = 1 << cur_rate;
    end
    slave_time <= slave_time + 1;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    smp_t e;
    nout++;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front();
      check(out_smp == e, $sformatf("sample %0d/%0d ts %0d/%0d rate %0d/%0d",
            out_smp.data, e.data, out_smp.ts, e.ts, out_smp.rate, e.rate));
    end
  end

  always @(negedge clk) delta = sample_t'($urandom);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (800) @(negedge clk);
    check(nout >= 800 / 8 - 2 && nout <= 800 / 8 + 2, $sformatf("rate 8: %0d outputs", nout));
    rate_log2 = 4'd5;
    repeat (1000) @(negedge clk);
    rate_log2 = 4'd0;
    repeat (50) @(negedge clk);
    rate_log2 = 4'd9;   // clamped to 7
    repeat (1000) @(negedge clk);
    @(negedge clk);
    check(exp_q.size() <= 1, "all predicted samples produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
