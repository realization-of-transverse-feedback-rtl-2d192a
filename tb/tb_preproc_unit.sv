// tb_preproc_unit: decompression, FIR and notch in a chain.
// Compressed samples (rate 2^3) arrive every 8 cycles. A reference model
// interpolates them linearly, runs the FIR convolution and the notch
// recursion on the result and predicts every output sample and its time
// tag; the output must come one per clock (the restored rate).
module tb_preproc_unit;
  import tfs_pkg::*;
  localparam int TAPS = 32, CW = 18, FFRAC = 16, NFRAC = 15, R = 3;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  smp_t in_smp = '0, out_smp;
  logic fir_we = 0;
  logic [4:0] fir_addr = '0;
  logic signed [CW-1:0] fir_data = '0;
  logic [9:0] notch_n = 10'd16;
  logic signed [CW-1:0] notch_coef [5];
  logic [15:0] gap_cnt, ovf_cnt;
  int checks = 0, failures = 0;
  longint fc [TAPS];
  longint xi[$], xf[$], yn[$];
  smp_t exp_q[$];

  preproc_unit #(.TAPS(TAPS), .COEF_W(CW), .FIR_FRAC(FFRAC), .NOTCH_FRAC(NFRAC)) dut (.*);
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

  // model: one restored sample through FIR and notch
  task automatic model_sample(longint x, ts_t ts);
    longint acc, y, f;
    int t, nn;
    xi.push_back(x);
    t = xi.size() - 1;
    acc = 0;
    for (int i = 0; i < TAPS; i++) if (t - i >= 0) acc += xi[t-i] * fc[i];
    f = clip(acc >>> FFRAC);
    xf.push_back(f);
    nn = int'(notch_n);
    acc = longint'(notch_coef[0]) * f;
    if (t >= nn)     acc += longint'(notch_coef[1]) * xf[t-nn] - longint'(notch_coef[3]) * yn[t-nn];
    if (t >= 2 * nn) acc += longint'(notch_coef[2]) * xf[t-2*nn] - longint'(notch_coef[4]) * yn[t-2*nn];
    y = clip(acc >>> NFRAC);
    yn.push_back(y);
    begin
      smp_t e;
      e.src = 4'd4; e.rate = 4'(R); e.ts = ts; e.data = sample_t'(clip(f - y));
      exp_q.push_back(e);
    end
  endtask

  int nout = 0, first_cycle = -1, last_cycle = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (!rst && out_valid) begin
    smp_t e;
    nout++;
    if (first_cycle < 0) first_cycle = cyc;
    last_cycle = cyc;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front();
      check(out_smp == e, $sformatf("out %0d expected %0d (ts %0d)", $signed(out_smp.data), $signed(e.data), e.ts));
    end
  end

  initial begin
    longint prev;
    ts_t t;
    for (int i = 0; i < TAPS; i++) fc[i] = (i < 4) ? (1 << FFRAC) / 4 : 0;
    notch_coef[0] = 18'sd1024; notch_coef[1] = 18'sd0; notch_coef[2] = 18'sd0;
    notch_coef[3] = -18'sd31744; notch_coef[4] = 18'sd0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < TAPS; i++) begin
      fir_addr = 5'(i); fir_data = CW'(fc[i]); fir_we = 1; @(negedge clk);
    end
    fir_we = 0;
    t = 32'd800;
    prev = 0;
    for (int k = 0; k < 150; k++) begin
      longint x;
      smp_t s;
      x = longint'(2000 + 1500 * ((k % 10) - 5)) + longint'($urandom % 64);
      if (k > 0)
        for (int j = 0; j < (1 << R); j++)
          model_sample(prev + (((x - prev) * j) >>> R), t - 32'(1 << R) + 32'(j));
      s.src = 4'd4; s.rate = 4'(R); s.ts = t; s.data = sample_t'(x);
      in_smp = s; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ((1 << R) - 1) @(negedge clk);
      prev = x;
      t += 32'(1 << R);
    end
    repeat (30) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("all outputs produced (%0d left)", exp_q.size()));
    check(nout == 149 * 8, $sformatf("output count %0d", nout));
    check(last_cycle - first_cycle + 1 == nout, "one output per clock, no holes");
    check(gap_cnt == 0 && ovf_cnt == 0, "no gap, no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
