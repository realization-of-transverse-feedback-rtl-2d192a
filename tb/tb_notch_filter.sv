// tb_notch_filter: IIR on every n-th sample, subtracted from the input.
// A model keeps the whole input/output history by sample index and
// computes y[t] = b0 x[t] + b1 x[t-n] + b2 x[t-2n] - a1 y[t-n] - a2 y[t-2n]
// (history before the start counts as zero) and out = x - y, both
// saturated. Random inputs with gaps, random coefficients, n changed at
// run time; then a DC offset must be removed by a slow DC estimator.
module tb_notch_filter;
  import tfs_pkg::*;
  localparam int AW = 8, CW = 18, FRAC = 15;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [AW-1:0] n = 8'd5;
  logic signed [CW-1:0] b0 = '0, b1 = '0, b2 = '0, a1 = '0, a2 = '0;
  smp_t in_smp = '0, out_smp;
  int checks = 0, failures = 0;
  longint xs[$], ys[$];
  smp_t exp_q[$];

  notch_filter #(.MEM_AW(AW), .COEF_W(CW), .COEF_FRAC(FRAC)) dut (.*);
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

  function automatic longint clip(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  longint last_out;
  always @(negedge clk) if (!rst && out_valid) begin
    smp_t e;
    last_out = longint'(out_smp.data);
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front();
      check(out_smp == e, $sformatf("out %0d expected %0d at ts %0d", $signed(out_smp.data), $signed(e.data), e.ts));
    end
  end

  task automatic feed(int cnt, int amp, int offset);
    for (int k = 0; k < cnt; k++) begin
      longint x, acc, y;
      int t, nn;
      smp_t s;
      nn = int'(n);
      x = longint'(int'($urandom % (2 * amp + 1)) - amp + offset);
      t = xs.size();
      acc = longint'(b0) * x;
      if (t >= nn)     acc += longint'(b1) * xs[t-nn] - longint'(a1) * ys[t-nn];
      if (t >= 2 * nn) acc += longint'(b2) * xs[t-2*nn] - longint'(a2) * ys[t-2*nn];
      y = clip(acc >>> FRAC);
      xs.push_back(x); ys.push_back(y);
      s.src = 4'd3; s.rate = 4'd1; s.ts = 32'(t); s.data = sample_t'(x);
      in_smp = s; in_valid = 1;
      s.data = sample_t'(clip(x - y));
      exp_q.push_back(s);
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 4 == 0) repeat ($urandom % 3) @(negedge clk);
    end
    repeat (3) @(negedge clk);   // let the pipeline drain before a change
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    b0 = 18'sd3000; b1 = 18'sd2000; b2 = -18'sd1000; a1 = -18'sd4000; a2 = 18'sd1500;
    feed(300, 20000, 0);
    // history limited to the memory: keep n*2 < 2^AW
    b0 = CW'(int'($urandom % 20000) - 10000); b1 = CW'(int'($urandom % 20000) - 10000);
    b2 = CW'(int'($urandom % 8000) - 4000);   a1 = CW'(int'($urandom % 20000) - 10000);
    a2 = CW'(int'($urandom % 8000) - 4000);
    feed(300, 30000, 0);
    @(negedge clk);
    n = 8'd40;                      // adaptive spacing: new revolution length
    feed(400, 30000, 0);
    // DC estimator y = x/64 + (63/64) y[t-n]: removes a constant offset
    b0 = 18'sd512; b1 = 0; b2 = 0; a1 = -18'sd32256; a2 = 0; n = 8'd2;
    feed(3000, 100, 5000);
    repeat (5) @(negedge clk);
    check(last_out > -300 && last_out < 300, $sformatf("offset removed: %0d", last_out));
    check(exp_q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
